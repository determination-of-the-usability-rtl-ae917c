// tb_fp32_div: checks fp32_div against double-precision division rounded
// once to binary32 (exact rounding), and its latency of 28 cycles from
// start to done.  Directed cases (exact quotients, 1/3, x/x, zero and
// infinity operands) then 3000 random pairs.
module tb_fp32_div;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  fp32_t a, b, y;
  logic  busy, done;
  int checks = 0, failures = 0;

  fp32_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t rnd_fp();
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(100 + ($urandom % 55));
    return r;
  endfunction

  task automatic try(fp32_t x, fp32_t z, fp32_t exp_y, int exp_lat);
    int lat;
    a = x; b = z; start = 1'b1;
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
      if (failures < 10) $display("FAIL: %h / %h = %h, expected %h", x, z, y, exp_y);
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
    try(32'h40c0_0000, 32'h4040_0000, 32'h4000_0000, 28);   // 6 / 3 = 2
    try(32'h3f80_0000, 32'h4040_0000, 32'h3eaa_aaab, 28);   // 1 / 3
    try(32'hc2f6_0000, 32'hc2f6_0000, 32'h3f80_0000, 28);   // x / x
    try(32'h0000_0000, 32'h4040_0000, 32'h0000_0000, 1);    // 0 / 3
    try(32'h3f80_0000, 32'h0000_0000, 32'h7f80_0000, 1);    // 1 / 0
    try(32'h0000_0000, 32'h0000_0000, 32'h7fc0_0000, 1);    // 0 / 0
    for (int i = 0; i < 3000; i++) begin
      fp32_t x, z;
      x = rnd_fp();
      z = rnd_fp();
      try(x, z, r2f(f2r(x) / f2r(z)), 28);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
