// tb_givens_rot: checks the pair rotation x' = c x - s y, y' = s x + c y.
// Random operands (and rotation values c, s taken as cos/sin of random
// angles) are applied and each output is compared with the same two-step
// single-precision computation done in the testbench (products rounded,
// then the sum rounded), allowing one unit in the last place for the rare
// double-rounding tie.  The block is combinational: outputs are sampled
// one time step after the inputs change.
module tb_givens_rot;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  fp32_t c, s, x, y, xo, yo, ex, ey;
  int checks = 0, failures = 0;

  givens_rot dut (.c, .s, .x, .y, .xo, .yo);

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      real ang;
      ang = real'($urandom % 62832) / 10000.0;
      c = r2f($cos(ang));
      s = r2f($sin(ang));
      x = r2f((real'($urandom % 2000001) - 1000000.0) / real'(1 << ($urandom % 20)));
      y = r2f((real'($urandom % 2000001) - 1000000.0) / real'(1 << ($urandom % 20)));
      if (n == 0) begin c = FP_ONE; s = FP_ZERO; end      // identity
      if (n == 1) begin c = FP_ZERO; s = FP_ONE; end      // quarter turn
      #1;
      ex = fsub(fmul(c, x), fmul(s, y));
      ey = fadd(fmul(s, x), fmul(c, y));
      checks++;
      if (!fp_close(xo, ex, 1)) begin
        failures++;
        if (failures < 10) $display("FAIL: xo %h expected %h", xo, ex);
      end
      checks++;
      if (!fp_close(yo, ey, 1)) begin
        failures++;
        if (failures < 10) $display("FAIL: yo %h expected %h", yo, ey);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
