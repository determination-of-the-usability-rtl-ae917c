// tb_fp32_sqrt: checks fp32_sqrt against the double-precision root
// rounded once to binary32 (exact rounding), and its latency of 28 cycles
// from start to done.  Directed cases (perfect squares, 2, odd and even
// exponents, zero, negative, infinity) then 3000 random operands.
module tb_fp32_sqrt;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  fp32_t a, y;
  logic  busy, done;
  int checks = 0, failures = 0;

  fp32_sqrt dut (.clk, .rst_n, .start, .a, .busy, .done, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(fp32_t x, fp32_t exp_y, int exp_lat);
    int lat;
    a = x; start = 1'b1;
    @(posedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(posedge clk);
      lat++;
    end
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL: sqrt(%h) = %h, expected %h", x, y, exp_y);
    end
    if (exp_lat > 0) begin
      checks++;
      if (lat != exp_lat) begin
        failures++;
        $display("FAIL: latency %0d, expected %0d", lat, exp_lat);
      end
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    try(32'h4080_0000, 32'h4000_0000, 28);   // sqrt(4) = 2
    try(32'h4110_0000, 32'h4040_0000, 28);   // sqrt(9) = 3
    try(32'h4000_0000, 32'h3fb5_04f3, 28);   // sqrt(2)
    try(32'h3e80_0000, 32'h3f00_0000, 28);   // sqrt(0.25)
    try(32'h0000_0000, 32'h0000_0000, 1);
    try(32'hc080_0000, 32'h7fc0_0000, 1);    // negative
    try(32'h7f80_0000, 32'h7f80_0000, 1);    // +inf
    for (int i = 0; i < 3000; i++) begin
      fp32_t x;
      x = $urandom;
      x[31] = 1'b0;
      x[30:23] = 8'(20 + ($urandom % 210));
      try(x, r2f($sqrt(f2r(x))), 28);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
