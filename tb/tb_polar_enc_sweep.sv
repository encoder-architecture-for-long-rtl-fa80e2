// tb_polar_enc_sweep: the folded encoder at other code lengths and levels of
// parallelism, each instance with its own random driver and checker
// (tb_polar_enc_driver): N=16/P=2, N=32/P=8, N=256/P=4 and N=1024/P=16.
// This shows the same RTL serves any power-of-two N and P with 2 <= P < N.
module tb_polar_enc_sweep;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  localparam int CN [NC] = '{16, 32, 256, 1024};
  localparam int CP [NC] = '{2, 8, 4, 16};

  logic done [NC];
  int   checks [NC];
  int   failures [NC];

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    localparam int N = CN[i];
    localparam int P = CP[i];
    logic         rst, in_valid, out_valid, out_last;
    logic [P-1:0] in_data, out_data;

    polar_enc_top #(.N(N), .P(P)) dut (.clk, .rst, .in_valid, .in_data, .out_valid, .out_last, .out_data);

    tb_polar_enc_driver #(.N(N), .P(P), .NFRAMES(12), .GAP_MAX(9)) u_drv (
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
    repeat (50000) @(posedge clk);
    c = 0; f = 1;
    for (int i = 0; i < NC; i++) begin c += checks[i]; f += failures[i]; end
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

endmodule
