// tb_polar_commutator: streams random bits into commutators with D = 1 and
// D = 2, with swap high in the second half of every 2D-cycle block. Once
// filled, at block position b = cycle mod 2D the unit must present
//   b >= D: (top[c-D], top[c])      pairs of the first lane
//   b <  D: (bot[c-2D], bot[c-D])   pairs of the second lane
// where top/bot[c] are the inputs of cycle c; the testbench keeps them.
module tb_polar_commutator;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic in_top, in_bot;
  logic sw1, sw2;
  logic o1_top, o1_bot, o2_top, o2_bot;
  logic top_h [$], bot_h [$];  // index k = cycle k of the stream

  polar_commutator #(.D(1)) dut1 (.clk, .swap(sw1), .in_top, .in_bot, .out_top(o1_top), .out_bot(o1_bot));
  polar_commutator #(.D(2)) dut2 (.clk, .swap(sw2), .in_top, .in_bot, .out_top(o2_top), .out_bot(o2_bot));

  task automatic check(int c, int dd, logic ot, logic ob);
    logic et, eb;
    if (c < 2 * dd) return;
    if ((c % (2 * dd)) >= dd) begin
      et = top_h[c-dd]; eb = top_h[c];
    end else begin
      et = bot_h[c-2*dd]; eb = bot_h[c-dd];
    end
    checks += 2;
    if (ot !== et || ob !== eb) begin
      failures++;
      $display("cycle %0d D=%0d: got (%0b,%0b) expected (%0b,%0b)", c, dd, ot, ob, et, eb);
    end
  endtask

  initial begin
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      in_top = 1'($urandom);
      in_bot = 1'($urandom);
      sw1 = (c % 2) >= 1;
      sw2 = (c % 4) >= 2;
      top_h.push_back(in_top);
      bot_h.push_back(in_bot);
      #1;
      check(c, 1, o1_top, o1_bot);
      check(c, 2, o2_top, o2_bot);
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
