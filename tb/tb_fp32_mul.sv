// tb_fp32_mul: checks fp32_mul against double-precision arithmetic
// rounded once to binary32 (which is exact rounding for a single *).
// Directed cases cover signed zeros, exact cancellation, carries out of
// the significand, rounding ties and infinities; then 20000 random
// operand pairs with exponents kept in the normal range.
module tb_fp32_mul;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp32_t a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t rnd_fp();
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(100 + ($urandom % 55));      // 2^-27 .. 2^27
    return r;
  endfunction

  task automatic try(fp32_t x, fp32_t z);
    fp32_t exp_y;
    a = x;
    b = z;
    @(posedge clk);
    exp_y = r2f(f2r(a) * f2r(b));
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL: %h * %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    try(32'h3f80_0000, 32'h3f80_0000);   // 1, 1
    try(32'h3f80_0000, 32'hbf80_0000);   // 1, -1
    try(32'h4040_0000, 32'h3f80_0001);
    try(32'h4b7f_ffff, 32'h3f00_0000);   // tie cases
    try(32'h4b7f_ffff, 32'h3f80_0000);
    try(32'h3fff_ffff, 32'h3fff_ffff);
    try(32'h0000_0000, 32'h4120_0000);
    try(32'h4120_0000, 32'h0000_0000);
    try(32'hc2c8_0000, 32'h42c8_0000);
    try(32'h3f80_0000, 32'h3380_0000);   // 1 and 2^-24
    try(32'h3f80_0000, 32'hb380_0000);
    for (int i = 0; i < 20000; i++) try(rnd_fp(), rnd_fp());
    // infinity: +inf with a finite number
    a = 32'h7f80_0000; b = 32'h3f80_0000;
    @(posedge clk);
    checks++;
    if (y != 32'h7f80_0000) begin failures++; $display("FAIL: inf case gave %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
