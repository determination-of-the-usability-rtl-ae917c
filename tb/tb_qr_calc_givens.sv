// tb_qr_calc_givens: checks the QR rotation unit.  For each pair (e1, e2)
// the rotation it returns must be orthonormal (c^2 + s^2 = 1), must
// eliminate e2 (s*e1 + c*e2 = 0 relative to the pair's size), and must
// match the unit's defined sign choices: for e2 = 0 it returns s = 0,
// c = sign(e1); for e1 = 0, s = -sign(e2), c = 0; otherwise c has the sign
// of e1.  All four branches are counted and each must occur.  Latency from
// start to done is at most 91 cycles (two divisions and a square root).
module tb_qr_calc_givens;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  fp32_t e1, e2, s, c;
  logic  busy, done;
  int checks = 0, failures = 0;
  int n_e2z = 0, n_e1z = 0, n_big = 0, n_small = 0;

  qr_calc_givens dut (.clk, .rst_n, .start, .e1, .e2, .busy, .done, .s, .c);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic try(real a, real b);
    real rs, rc, res, scale;
    int lat;
    e1 = r2f(a); e2 = r2f(b);
    a = f2r(e1); b = f2r(e2);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    rs = f2r(s);
    rc = f2r(c);
    check(lat <= 91, $sformatf("latency %0d", lat));
    if (b == 0.0) begin
      n_e2z++;
      check(rs == 0.0 && rc == ((a < 0) ? -1.0 : 1.0), $sformatf("e2=0: s=%f c=%f", rs, rc));
    end else if (a == 0.0) begin
      n_e1z++;
      check(rc == 0.0 && rs == ((b < 0) ? 1.0 : -1.0), $sformatf("e1=0: s=%f c=%f", rs, rc));
    end else begin
      if (((b < 0) ? -b : b) > ((a < 0) ? -a : a)) n_big++; else n_small++;
      res   = rs * a + rc * b;
      scale = ((a < 0) ? -a : a) + ((b < 0) ? -b : b);
      check((rc*rc + rs*rs - 1.0) < 1e-6 && (1.0 - rc*rc - rs*rs) < 1e-6,
            $sformatf("c^2+s^2 = %f for (%g,%g)", rc*rc + rs*rs, a, b));
      check(res < 1e-6 * scale && -res < 1e-6 * scale,
            $sformatf("s*e1 + c*e2 = %g for (%g,%g)", res, a, b));
      check((rc < 0) == (a < 0), $sformatf("sign of c for (%g,%g)", a, b));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    try(3.0, 0.0);
    try(-3.0, 0.0);
    try(0.0, 2.0);
    try(0.0, -2.0);
    try(3.0, 4.0);
    try(4.0, -3.0);
    for (int n = 0; n < 400; n++)
      try((real'($urandom % 20001) - 10000.0) / real'(1 << ($urandom % 12)),
          (real'($urandom % 20001) - 10000.0) / real'(1 << ($urandom % 12)));
    check(n_e2z > 0 && n_e1z > 0 && n_big > 0 && n_small > 0, "a branch never taken");
    $display("branches: e2=0 %0d, e1=0 %0d, |e2|>|e1| %0d, other %0d", n_e2z, n_e1z, n_big, n_small);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
