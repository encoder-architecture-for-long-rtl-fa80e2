// tb_polar_enc_ctrl: checks the encoder control for N=16, P=4 (two folded
// stages, latency 3) and N=128, P=4 (five folded stages, latency 31).
// Random frames of N/P consecutive valid cycles are sent with random gaps.
// The testbench keeps the history of (valid, word index) of every input
// cycle and expects, each cycle c,
//   swap[m]   = valid[c-(2^m-1)] and bit m of index[c-(2^m-1)]
//   out_valid = valid[c-(N/P-1)],  out_last = out_valid and index = N/P-1.
module tb_polar_enc_ctrl;

  logic clk = 0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  logic rst, in_valid;
  logic [1:0] swap_a;
  logic [4:0] swap_b;
  logic ov_a, ol_a, ov_b, ol_b;
  int   vh [$];  // per cycle: -1 idle, else word index in the frame
  int   n_b2b = 0;

  polar_enc_ctrl #(.N(16),  .P(4)) dut_a (.clk, .rst, .in_valid, .swap(swap_a), .out_valid(ov_a), .out_last(ol_a));
  polar_enc_ctrl #(.N(128), .P(4)) dut_b (.clk, .rst, .in_valid, .swap(swap_b), .out_valid(ov_b), .out_last(ol_b));

  // Word index, modulo the frame length fl, of the input dly cycles before c.
  function automatic int tag(int c, int dly, int fl);
    return (c - dly < 0 || vh[c-dly] < 0) ? -1 : vh[c-dly] % fl;
  endfunction

  task automatic check_one(int c, int fl, int nf, logic [4:0] sw, logic ov, logic ol, string name);
    for (int m = 0; m < nf; m++) begin
      int t = tag(c, (1 << m) - 1, fl);
      logic e = (t >= 0) && t[m];
      checks++;
      if (sw[m] !== e) begin failures++; $display("%s cycle %0d: swap[%0d]=%0b", name, c, m, sw[m]); end
    end
    begin
      int t = tag(c, fl - 1, fl);
      checks += 2;
      if (ov !== (t >= 0)) begin failures++; $display("%s cycle %0d: out_valid=%0b", name, c, ov); end
      if (ol !== (t == fl - 1)) begin failures++; $display("%s cycle %0d: out_last=%0b", name, c, ol); end
    end
  endtask

  initial begin
    int c;
    c = 0;
    rst = 1; in_valid = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // 32-word frames (the longer of the two) drive both controls; the 16-bit
    // control sees each as eight 4-word frames back to back.
    for (int f = 0; f < 12; f++) begin
      int gap;
      gap = (f % 3 == 1) ? 0 : $urandom_range(1, 40);
      if (gap == 0) n_b2b++;
      for (int k = 0; k < gap + 32; k++) begin
        @(negedge clk);
        in_valid = (k >= gap);
        vh.push_back(in_valid ? (k - gap) : -1);
        #1;
        check_one(c, 4, 2, {3'b0, swap_a}, ov_a, ol_a, "N=16");
        check_one(c, 32, 5, swap_b, ov_b, ol_b, "N=128");
        c++;
      end
    end
    checks++;
    if (n_b2b == 0) begin failures++; $display("no back-to-back frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
