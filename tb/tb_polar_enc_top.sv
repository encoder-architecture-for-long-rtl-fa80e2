// tb_polar_enc_top: end-to-end test of the encoder at its default size
// (N = 16, P = 4). The encoder runs with its own parameter defaults; the
// driver streams random frames with and without gaps, resets once mid-frame,
// and checks every output word, the output valid/last flags and the
// 3-cycle latency against an independent model of u * F^(x)4.
module tb_polar_enc_top;

  localparam int unsigned N = 16;
  localparam int unsigned P = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst, in_valid, out_valid, out_last, done;
  logic [P-1:0] in_data, out_data;
  int           checks, failures;

  polar_enc_top dut (.*);

  tb_polar_enc_driver #(.N(N), .P(P), .NFRAMES(60), .GAP_MAX(5)) u_drv (
    .clk, .rst, .in_valid, .in_data, .out_valid, .out_last, .out_data,
    .swap(dut.swap), .done, .checks, .failures
  );

  initial begin
    @(posedge clk);  // let the driver clear done first
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
