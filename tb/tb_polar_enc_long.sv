// tb_polar_enc_long: the encoder at the message sizes of storage sectors:
// 4096 bytes = 32768 bits with P = 4 and P = 16, and 8192 bytes = 65536 bits
// and 16384 bytes = 131072 bits with P = 16. Each frame takes N/P cycles; a few random frames (with a gap, back to back and a mid-frame reset)
// are encoded and every output bit is checked against a software butterfly
// model of u * F^(x)n.
module tb_polar_enc_long;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  localparam int CN [NC] = '{32768, 32768, 65536, 131072};
  localparam int CP [NC] = '{4, 16, 16, 16};

  logic done [NC];
  int   checks [NC];
  int   failures [NC];

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    localparam int N = CN[i];
    localparam int P = CP[i];
    logic         rst, in_valid, out_valid, out_last;
    logic [P-1:0] in_data, out_data;

    polar_enc_top #(.N(N), .P(P)) dut (.clk, .rst, .in_valid, .in_data, .out_valid, .out_last, .out_data);

    tb_polar_enc_driver #(.N(N), .P(P), .NFRAMES(4), .GAP_MAX(100)) u_drv (
      .clk, .rst, .in_valid, .in_data, .out_valid, .out_last, .out_data,
      .swap(dut.swap), .done(done[i]), .checks(checks[i]), .failures(failures[i])
    );
  end

  initial begin
    int c, f;
    @(posedge clk);  // let the drivers clear done first
    for (int i = 0; i < NC; i++) wait (done[i]);
    c = 0; f = 0;
    for (int i = 0; i < NC; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int c, f;
    repeat (200000) @(posedge clk);
    c = 0; f = 1;
    for (int i = 0; i < NC; i++) begin c += checks[i]; f += failures[i]; end
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

endmodule
