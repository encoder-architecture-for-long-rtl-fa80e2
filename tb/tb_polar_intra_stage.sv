// tb_polar_intra_stage: checks intra-word butterfly stages exhaustively for
// P = 4 (stages 1 and 2) and P = 8 (stage 3). Expected outputs: for every
// lane i with bit S-1 clear, out[i] = in[i] xor in[i + 2^(S-1)], and the
// partner lane passes its input unchanged.
module tb_polar_intra_stage;

  int checks = 0, failures = 0;

  logic [3:0] a_in, a1_out, a2_out;
  logic [7:0] b_in, b3_out;

  polar_intra_stage #(.P(4), .S(1)) dut_s1 (.in_data(a_in), .out_data(a1_out));
  polar_intra_stage #(.P(4), .S(2)) dut_s2 (.in_data(a_in), .out_data(a2_out));
  polar_intra_stage #(.P(8), .S(3)) dut_s3 (.in_data(b_in), .out_data(b3_out));

  function automatic logic [7:0] model(logic [7:0] x, int p, int s);
    logic [7:0] y = x;
    int d = 1 << (s - 1);
    for (int i = 0; i < p; i++)
      if ((i & d) == 0) y[i] = x[i] ^ x[i+d];
    return y;
  endfunction

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      a_in = 4'(v);
      #1;
      check({4'b0, a1_out}, model({4'b0, a_in}, 4, 1), "P=4 S=1");
      check({4'b0, a2_out}, model({4'b0, a_in}, 4, 2), "P=4 S=2");
    end
    for (int v = 0; v < 256; v++) begin
      b_in = 8'(v);
      #1;
      check(b3_out, model(b_in, 8, 3), "P=8 S=3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
