// tb_polar_fold_stage: a folded stage with P = 4 and D = 2 (stage 4 of the
// 16-bit encoder) and one with P = 8 and D = 1. Random words stream in with
// swap high in the second half of every 2D-cycle block. For each lane pair
// (k, k+P/2) the testbench forms the pair the stage should combine (see
// tb_polar_commutator) and expects lane k = earlier xor later, lane k+P/2 =
// later.
module tb_polar_fold_stage;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] a_in, a_out;
  logic [7:0] b_in, b_out;
  logic sw_a, sw_b;
  logic [7:0] hist [$];  // hist[c]: {b_in} ; a_in is b_in[3:0]

  polar_fold_stage #(.P(4), .D(2)) dut_a (.clk, .swap(sw_a), .in_data(a_in), .out_data(a_out));
  polar_fold_stage #(.P(8), .D(1)) dut_b (.clk, .swap(sw_b), .in_data(b_in), .out_data(b_out));

  function automatic logic [7:0] model(int c, int p, int dd);
    logic [7:0] y = '0;
    int h = p / 2;
    for (int k = 0; k < h; k++) begin
      logic e, l;
      if ((c % (2 * dd)) >= dd) begin
        e = hist[c-dd][k];     l = hist[c][k];
      end else begin
        e = hist[c-2*dd][k+h]; l = hist[c-dd][k+h];
      end
      y[k]   = e ^ l;
      y[k+h] = l;
    end
    return y;
  endfunction

  initial begin
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      b_in = 8'($urandom);
      a_in = b_in[3:0];
      sw_a = (c % 4) >= 2;
      sw_b = (c % 2) >= 1;
      hist.push_back(b_in);
      #1;
      if (c >= 4) begin
        logic [7:0] ea, eb;  // ea[7:4] unused: the P=4 stage has four lanes
        // the P=4 stage sees only the low nibble
        ea = model(c, 4, 2);
        eb = model(c, 8, 1);
        checks += 2;
        if (a_out !== ea[3:0]) begin failures++; $display("cycle %0d P=4: %b vs %b", c, a_out, ea[3:0]); end
        if (b_out !== eb) begin failures++; $display("cycle %0d P=8: %b vs %b", c, b_out, eb); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
