// tb_jcb_calc_givens: checks the Jacobi rotation unit.  For random
// symmetric 2x2 blocks (a_ii, a_ij, a_jj) it checks, in double precision,
// that c^2 + s^2 = 1, that the rotated off-diagonal element
// (c^2 - s^2) a_ij + c s (a_ii - a_jj) vanishes relative to the block's
// size, and that t = s/c follows the sign rule of the method (t has the
// sign opposite to w = (a_jj - a_ii) / (2 a_ij), |t| >= 1 ... i.e. the
// root -w - sqrt(w^2+1) for w < 0 and -w + sqrt(w^2+1) otherwise).  It
// also checks the latency: at most 150 cycles from start to done.
module tb_jcb_calc_givens;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  fp32_t e1, e2, e3, s, c;
  logic  busy, done;
  int checks = 0, failures = 0;

  jcb_calc_givens dut (.clk, .rst_n, .start, .e1, .e2, .e3, .busy, .done, .s, .c);

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

  task automatic try(real aii, real aij, real ajj);
    real rs, rc, w, t_exp, off, scale;
    int lat;
    e1 = r2f(aii); e2 = r2f(aij); e3 = r2f(ajj);
    start = 1'b1;
    @(posedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(posedge clk);
      lat++;
    end
    rs = f2r(s);
    rc = f2r(c);
    aii = f2r(e1); aij = f2r(e2); ajj = f2r(e3);
    w = (ajj - aii) / (2.0 * aij);
    t_exp = (w < 0) ? -w - $sqrt(w*w + 1.0) : -w + $sqrt(w*w + 1.0);
    off = (rc*rc - rs*rs) * aij + rc * rs * (aii - ajj);
    scale = ((aii < 0) ? -aii : aii) + ((aij < 0) ? -aij : aij) + ((ajj < 0) ? -ajj : ajj);
    check((rc*rc + rs*rs - 1.0) < 1e-6 && (1.0 - rc*rc - rs*rs) < 1e-6,
          $sformatf("c^2+s^2 = %f for (%f,%f,%f)", rc*rc + rs*rs, aii, aij, ajj));
    check((off < 1e-5 * scale) && (-off < 1e-5 * scale),
          $sformatf("rotated a_ij = %g for (%f,%f,%f)", off, aii, aij, ajj));
    check(((rs / rc) - t_exp) < 1e-5 * (1.0 + ((t_exp < 0) ? -t_exp : t_exp)) &&
          (t_exp - (rs / rc)) < 1e-5 * (1.0 + ((t_exp < 0) ? -t_exp : t_exp)),
          $sformatf("tan = %f, expected %f", rs / rc, t_exp));
    check(lat <= 150, $sformatf("latency %0d, expected at most 150", lat));
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    try(1.0, 1.0, 1.0);        // w = 0: 45 degrees
    try(6.0, 5.0, 1.0);
    try(1.0, 2.0, 3.0);
    try(-4.0, 0.5, 7.0);
    for (int i = 0; i < 300; i++)
      try(real'($urandom % 2001) / 100.0 - 10.0, real'($urandom % 2000 + 1) / 100.0 - 10.005,
          real'($urandom % 2001) / 100.0 - 10.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
