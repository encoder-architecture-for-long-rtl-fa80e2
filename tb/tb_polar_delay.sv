// tb_polar_delay: feeds random words into delay chains of length 1 and 5 and
// checks that each output equals the input of exactly D cycles earlier, kept
// in a history array by the testbench.
module tb_polar_delay;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [2:0] d, q1, q5;
  logic [2:0] hist [$];

  polar_delay #(.W(3), .D(1)) dut1 (.clk, .d, .q(q1));
  polar_delay #(.W(3), .D(5)) dut5 (.clk, .d, .q(q5));

  initial begin
    d = '0;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      // hist[k] is the value driven k cycles before the last edge.
      if (hist.size() >= 1) begin
        checks++;
        if (q1 !== hist[0]) begin failures++; $display("cycle %0d D=1: %0d vs %0d", c, q1, hist[0]); end
      end
      if (hist.size() >= 5) begin
        checks++;
        if (q5 !== hist[4]) begin failures++; $display("cycle %0d D=5: %0d vs %0d", c, q5, hist[4]); end
      end
      d = 3'($urandom);
      hist.push_front(d);
      if (hist.size() > 8) void'(hist.pop_back());
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
