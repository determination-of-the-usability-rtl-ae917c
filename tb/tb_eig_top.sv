// tb_eig_top: end-to-end test of the overlay with both kernels at their
// default sizes.
//
// A host model programs both kernels over their AXI4-Lite ports exactly
// as a driver would (argument registers, IER/GIE, ap_start), lets them run
// at the same time, waits for the interrupts, checks the AP_CTRL
// handshake (done set, then cleared by the read) and checks the results
// in the memory models:
//   run 1: the 10 x 10 matrix a(i,j) = min(i,j) + 1.  Its eigenvalues are
//          known in closed form, 1 / (4 sin^2((2k-1) pi / (4n+2))); each
//          kernel's eigenvalues must match them, every eigenpair must
//          satisfy A v = lambda v, V must be orthonormal, and the loop
//          counts must be 14 (QR) and 85 (Jacobi), the counts published for
//          this matrix.
//   run 3: the same matrix at n = 20; the loop counts must be 82 (QR) and
//          212 (Jacobi), the counts of a float32 software model of the
//          same loops (the published counts are 33 and 219).
//   run 2: 3 * I (6 x 6), which exercises the zero-element branches: the
//          QR shift correction, the e2 = 0 rotation and the Jacobi
//          zero-pivot skip; both kernels must finish after one iteration
//          with eigenvalues 3 and V = I.
// The memory models stall at random.  Each mechanism of the design is
// counted and must have occurred.
module tb_eig_top;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_m2s_t qr_ci, jcb_ci;
  axil_s2m_t qr_co, jcb_co;
  axi_m2s_t  qr_gm, qr_gm1, jcb_gm, jcb_gm1;
  axi_s2m_t  qr_gs, qr_gs1, jcb_gs, jcb_gs1;
  logic      qr_irq, jcb_irq;
  logic [31:0] qr_iter, jcb_iter;

  eig_top dut (
    .clk, .rst_n,
    .qr_ctrl_in(qr_ci), .qr_ctrl_out(qr_co),
    .qr_gmem_m(qr_gm), .qr_gmem_s(qr_gs), .qr_gmem1_m(qr_gm1), .qr_gmem1_s(qr_gs1),
    .qr_irq, .qr_iterations(qr_iter),
    .jcb_ctrl_in(jcb_ci), .jcb_ctrl_out(jcb_co),
    .jcb_gmem_m(jcb_gm), .jcb_gmem_s(jcb_gs), .jcb_gmem1_m(jcb_gm1), .jcb_gmem1_s(jcb_gs1),
    .jcb_irq, .jcb_iterations(jcb_iter)
  );

  // input memories (gmem) and result memories (gmem1): eigenvalues at
  // byte 0, eigenvectors at byte 0x400
  axi_mem_model #(.WORDS(512)) m_qr_in   (.clk, .rst_n, .m(qr_gm),   .s(qr_gs));
  axi_mem_model #(.WORDS(1024)) m_qr_out  (.clk, .rst_n, .m(qr_gm1),  .s(qr_gs1));
  axi_mem_model #(.WORDS(512)) m_jcb_in  (.clk, .rst_n, .m(jcb_gm),  .s(jcb_gs));
  axi_mem_model #(.WORDS(1024)) m_jcb_out (.clk, .rst_n, .m(jcb_gm1), .s(jcb_gs1));

  localparam int OUT2_WORD = 512;
  localparam int MAXN      = 20;

  real a [MAXN][MAXN];    // matrix under test
  real ref_ev [MAXN];     // its eigenvalues, ascending

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (QR in %s, Jacobi in %s)",
             dut.u_qr.state_q.name(), dut.u_jcb.state_q.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host model
  task automatic lite_write(bit jcb, logic [5:0] addr, logic [31:0] data);
    axil_m2s_t req;
    req = '0;
    req.awvalid = 1'b1; req.awaddr = addr;
    req.wvalid = 1'b1;  req.wdata = data; req.wstrb = 4'hf;
    req.bready = 1'b1;
    if (jcb) jcb_ci <= req; else qr_ci <= req;
    @(posedge clk);
    while (!(jcb ? jcb_co.awready : qr_co.awready)) @(posedge clk);
    req.awvalid = 1'b0; req.wvalid = 1'b0;
    if (jcb) jcb_ci <= req; else qr_ci <= req;
    @(posedge clk);
    while (!(jcb ? jcb_co.bvalid : qr_co.bvalid)) @(posedge clk);
    req.bready = 1'b0;
    if (jcb) jcb_ci <= req; else qr_ci <= req;
  endtask

  task automatic lite_read(bit jcb, logic [5:0] addr, output logic [31:0] data);
    axil_m2s_t req;
    req = '0;
    req.arvalid = 1'b1; req.araddr = addr; req.rready = 1'b1;
    if (jcb) jcb_ci <= req; else qr_ci <= req;
    @(posedge clk);
    while (!(jcb ? jcb_co.arready : qr_co.arready)) @(posedge clk);
    req.arvalid = 1'b0;
    if (jcb) jcb_ci <= req; else qr_ci <= req;
    @(posedge clk);
    while (!(jcb ? jcb_co.rvalid : qr_co.rvalid)) @(posedge clk);
    data = jcb ? jcb_co.rdata : qr_co.rdata;
    req.rready = 1'b0;
    if (jcb) jcb_ci <= req; else qr_ci <= req;
  endtask

  task automatic setup_kernel(bit jcb, int n);
    lite_write(jcb, REG_IN,   32'h0);
    lite_write(jcb, REG_OUT1, 32'h0);
    lite_write(jcb, REG_OUT2, 32'(OUT2_WORD * 4));
    lite_write(jcb, REG_DIM,  32'(n));
    lite_write(jcb, REG_IER,  32'h1);
    lite_write(jcb, REG_GIE,  32'h1);
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_hess_rot, n_qr_rot, n_shift_fix, n_e2_zero, n_e1_small, n_e1_big;
  int n_jcb_rot, n_zero_pivot, n_skip_l, n_both_busy, n_irq;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_qr.rot_start &&  dut.u_qr.hess_q) n_hess_rot++;
    if (dut.u_qr.rot_start && !dut.u_qr.hess_q) n_qr_rot++;
    if (dut.u_qr.u_diag.done && dut.u_qr.u_diag.op_q == 3'd0 && dut.u_qr.u_diag.hit_q)
      n_shift_fix++;
    if (dut.u_qr.giv_start) begin
      if (fp_is_zero(dut.u_qr.a_rdata[1]))                       n_e2_zero++;
      else if (fp_mag_gt(dut.u_qr.a_rdata[1], dut.u_qr.a_rdata[0])) n_e1_small++;
      else                                                        n_e1_big++;
    end
    if (dut.u_jcb.rot_start) n_jcb_rot++;
    if (dut.u_jcb.find_done && fp_is_zero(dut.u_jcb.find_akl)) n_zero_pivot++;
    if (dut.u_jcb.piv_done && dut.u_jcb.state_q.name() == "S_UPK_W" &&
        dut.u_jcb.l_q == dut.u_jcb.dim_q - 1) n_skip_l++;
    if (!dut.u_qr.ap_idle && !dut.u_jcb.ap_idle) n_both_busy++;
  end

  // ------------------------------------------------------------ result checks

  task automatic check_results(bit jcb, int n, string tag);
    real lam[$], srt[$], v[MAXN][MAXN], lmax, tol, err, dot;
    for (int i = 0; i < n; i++)
      lam.push_back(f2r(jcb ? m_jcb_out.mem[i] : m_qr_out.mem[i]));
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        v[i][j] = f2r(jcb ? m_jcb_out.mem[OUT2_WORD + i*n + j] : m_qr_out.mem[OUT2_WORD + i*n + j]);
    // eigenvalues against the closed form, after sorting
    srt = lam;
    srt.sort();
    lmax = ref_ev[n-1];
    // The Jacobi loop stops on an unchanged diagonal, which leaves errors
    // of up to about 1e-4 of the largest eigenvalue (the float32 model of
    // the loop shows the same), so its bound is looser than the QR one.
    tol  = (jcb ? 5e-4 : 1e-4) * lmax + 1e-5;
    for (int k = 0; k < n; k++)
      check((srt[k] - ref_ev[k] <= tol) && (ref_ev[k] - srt[k] <= tol),
            $sformatf("%s eigenvalue %0d = %f, expected %f", tag, k, srt[k], ref_ev[k]));
    // A v_k = lambda_k v_k, column k of V
    for (int k = 0; k < n; k++) begin
      err = 0.0;
      for (int i = 0; i < n; i++) begin
        real r;
        r = -lam[k] * v[i][k];
        for (int j = 0; j < n; j++) r += a[i][j] * v[j][k];
        if (r < 0) r = -r;
        if (r > err) err = r;
      end
      // The Jacobi kernel stops as soon as one sweep leaves the diagonal
      // unchanged, which leaves off-diagonal entries of about 1e-4 of the
      // largest eigenvalue (the float32 reference model shows the same), so
      // its residual bound is looser than the QR kernel's.
      check(err <= (jcb ? 5e-4 : 1e-4) * lmax + 1e-5, $sformatf("%s residual of pair %0d = %g", tag, k, err));
    end
    // V orthonormal
    err = 0.0;
    for (int p = 0; p < n; p++)
      for (int q = 0; q < n; q++) begin
        dot = (p == q) ? -1.0 : 0.0;
        for (int i = 0; i < n; i++) dot += v[i][p] * v[i][q];
        if (dot < 0) dot = -dot;
        if (dot > err) err = dot;
      end
    check(err <= 1e-4, $sformatf("%s V not orthonormal, max deviation %g", tag, err));
  endtask

  task automatic run(int n, int exp_qr, int exp_jcb, string tag);
    logic [31:0] st;
    int t0, t_qr, t_jcb;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        m_qr_in.mem[i*n + j]  = r2f(a[i][j]);
        m_jcb_in.mem[i*n + j] = r2f(a[i][j]);
      end
    setup_kernel(1'b0, n);
    setup_kernel(1'b1, n);
    lite_read(1'b0, REG_AP_CTRL, st);
    check(st[AP_IDLE] && !st[AP_DONE], $sformatf("%s QR not idle before start (0x%h)", tag, st));
    lite_write(1'b0, REG_AP_CTRL, 32'h1);
    lite_write(1'b1, REG_AP_CTRL, 32'h1);
    t0 = 0; t_qr = 0; t_jcb = 0;
    while (t_qr == 0 || t_jcb == 0) begin
      @(posedge clk);
      t0++;
      if (qr_irq  && t_qr  == 0) t_qr  = t0;
      if (jcb_irq && t_jcb == 0) t_jcb = t0;
    end
    n_irq += 2;
    $display("%s: QR %0d iterations in %0d cycles, Jacobi %0d iterations in %0d cycles",
             tag, qr_iter, t_qr, jcb_iter, t_jcb);
    for (int k = 0; k < 2; k++) begin
      lite_read(k[0], REG_AP_CTRL, st);
      check(st[AP_DONE] && st[AP_IDLE] && !st[AP_START],
            $sformatf("%s kernel %0d AP_CTRL after run 0x%h", tag, k, st));
      lite_read(k[0], REG_AP_CTRL, st);
      check(!st[AP_DONE], $sformatf("%s kernel %0d ap_done not cleared by read", tag, k));
      lite_write(k[0], REG_ISR, 32'h1);
    end
    @(posedge clk);
    check(!qr_irq && !jcb_irq, $sformatf("%s interrupt not cleared", tag));
    check(qr_iter == 32'(exp_qr),   $sformatf("%s QR iterations %0d, expected %0d", tag, qr_iter, exp_qr));
    check(jcb_iter == 32'(exp_jcb), $sformatf("%s Jacobi iterations %0d, expected %0d", tag, jcb_iter, exp_jcb));
    check_results(1'b0, n, {tag, " QR"});
    check_results(1'b1, n, {tag, " Jacobi"});
  endtask

  initial begin
    int n;
    qr_ci = '0;
    jcb_ci = '0;
    {n_hess_rot, n_qr_rot, n_shift_fix, n_e2_zero, n_e1_small, n_e1_big} = '0;
    {n_jcb_rot, n_zero_pivot, n_skip_l, n_both_busy, n_irq} = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // run 1: min(i,j) + 1 matrix, n = 10
    n = 10;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) a[i][j] = real'(((i < j) ? i : j) + 1);
    end
    for (int k = 1; k <= n; k++) begin
      real sv;
      sv = $sin(real'(2*k - 1) * 3.14159265358979 / real'(4*n + 2));
      ref_ev[n-k] = 1.0 / (4.0 * sv * sv);
    end
    run(n, 14, 85, "min-matrix n=10");

    // run 3: the same family at n = 20, the next size of the published
    // tables.  Expected counts come from a float32 software model of the
    // same loops (82 and 212); the published counts are 33 and 219.
    n = 20;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) a[i][j] = real'(((i < j) ? i : j) + 1);
    end
    for (int k = 1; k <= n; k++) begin
      real sv;
      sv = $sin(real'(2*k - 1) * 3.14159265358979 / real'(4*n + 2));
      ref_ev[n-k] = 1.0 / (4.0 * sv * sv);
    end
    run(n, 82, 212, "min-matrix n=20");

    // run 2: 3 * I, n = 6
    n = 6;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) a[i][j] = (i == j) ? 3.0 : 0.0;
      ref_ev[i] = 3.0;
    end
    run(n, 1, 1, "3*I n=6");

    $display("mechanisms: hessenberg rotations %0d, QR sweep rotations %0d, shift corrections %0d",
             n_hess_rot, n_qr_rot, n_shift_fix);
    $display("            QR givens e2=0 %0d, |e2|>|e1| %0d, |e2|<=|e1| %0d", n_e2_zero, n_e1_small, n_e1_big);
    $display("            Jacobi rotations %0d, zero-pivot skips %0d, last-row pivot skips %0d",
             n_jcb_rot, n_zero_pivot, n_skip_l);
    $display("            cycles with both kernels busy %0d, interrupts %0d, AXI stalls %0d",
             n_both_busy, n_irq, m_qr_in.n_stall + m_jcb_in.n_stall + m_qr_out.n_stall + m_jcb_out.n_stall);
    check(n_hess_rot > 0,   "Hessenberg reduction never rotated");
    check(n_qr_rot > 0,     "QR sweep never rotated");
    check(n_shift_fix > 0,  "shift correction never fired");
    check(n_e2_zero > 0,    "QR givens e2=0 branch never taken");
    check(n_e1_small > 0,   "QR givens |e2|>|e1| branch never taken");
    check(n_e1_big > 0,     "QR givens |e2|<=|e1| branch never taken");
    check(n_jcb_rot > 0,    "Jacobi never rotated");
    check(n_zero_pivot > 0, "Jacobi zero-pivot skip never happened");
    check(n_skip_l > 0,     "Jacobi last-row pivot skip never happened");
    check(n_both_busy > 0,  "kernels never ran concurrently");
    check(m_qr_in.n_stall + m_jcb_out.n_stall > 0, "AXI back-pressure never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
