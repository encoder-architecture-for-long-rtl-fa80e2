// tb_polar_kernel_fu: exhaustive check of the 2x2 polar kernel unit against
// the product (a, b) * [[1,0],[1,1]] = (a xor b, b), for all four inputs.
module tb_polar_kernel_fu;

  logic a, b, y_top, y_bot;
  int   checks = 0, failures = 0;

  polar_kernel_fu dut (.*);

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic e_top, e_bot;
      a = v[0];
      b = v[1];
      // Row vector times the kernel matrix, column by column.
      e_top = (a & 1'b1) ^ (b & 1'b1);
      e_bot = (a & 1'b0) ^ (b & 1'b1);
      #1;
      checks += 2;
      if (y_top !== e_top) begin failures++; $display("a=%0b b=%0b y_top=%0b", a, b, y_top); end
      if (y_bot !== e_bot) begin failures++; $display("a=%0b b=%0b y_bot=%0b", a, b, y_bot); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
