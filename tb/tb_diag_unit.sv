// tb_diag_unit: checks the diagonal operations on 6 x 6 matrices in a
// small mat_ram.  Each round writes a random diagonal (sometimes with the
// last element repeated elsewhere, so the shift correction fires), then
// runs SHIFT, SUB, ADD and CONV and compares with the testbench's own
// single-precision arithmetic: the shift value, every diagonal element
// after SUB and after ADD, off-diagonal elements untouched, and the
// convergence flag (one element is changed between SUB and ADD on odd
// rounds; the flag is true only when the diagonal came back bit for bit).
// SAVE followed by CONV with no change must report convergence.  Each
// operation must finish in dim + 3 cycles, dim + 4 for SHIFT.
module tb_diag_unit;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 6;
  localparam logic [2:0] OP_SHIFT = 3'd0, OP_SUB = 3'd1, OP_ADD = 3'd2, OP_SAVE = 3'd3, OP_CONV = 3'd4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] op;
  idx_t  dim = idx_t'(N);
  ram_req_t [1:0] req;
  fp32_t    [1:0] rdata;
  logic  busy, done, converged;
  fp32_t shift;
  fp32_t d [N], orig [N*N];
  int checks = 0, failures = 0, n_fix = 0, n_conv = 0, n_noconv = 0;

  mat_ram #(.DEPTH(64)) ram (.clk, .req, .rdata);
  diag_unit #(.MAX_DIM(8)) dut (.clk, .rst_n, .start, .op, .dim, .req, .rdata, .busy, .done,
                                .shift, .converged);

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic run_op(logic [2:0] o);
    int lat;
    op = o;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    check(lat == ((o == OP_SHIFT) ? N + 4 : N + 3), $sformatf("op %0d took %0d cycles", o, lat));
  endtask

  task automatic check_matrix(string what);
    for (int r = 0; r < N; r++)
      for (int q = 0; q < N; q++)
        check(ram.mem[r*N + q] == ((r == q) ? d[r] : orig[r*N + q]),
              $sformatf("%s: (%0d,%0d) = %h, expected %h", what, r, q, ram.mem[r*N + q],
                        (r == q) ? d[r] : orig[r*N + q]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      fp32_t sh, prev_d [N];
      bit hit;
      for (int q = 0; q < N*N; q++) orig[q] = r2f((real'($urandom % 20001) - 10000.0) / 64.0);
      for (int r = 0; r < N; r++) d[r] = orig[r*N + r];
      if (t % 3 == 0) d[$urandom % (N - 1)] = d[N-1];
      for (int r = 0; r < N; r++) orig[r*N + r] = d[r];
      for (int q = 0; q < N*N; q++) ram.mem[q] = orig[q];
      // SHIFT
      hit = 1'b0;
      for (int r = 0; r < N - 1; r++) if (d[r] == d[N-1]) hit = 1'b1;
      sh = hit ? fsub(d[N-1], FP_ONE) : d[N-1];
      if (hit) n_fix++;
      run_op(OP_SHIFT);
      check(shift == sh, $sformatf("shift %h, expected %h", shift, sh));
      // SUB (also saves the old diagonal)
      prev_d = d;
      for (int r = 0; r < N; r++) d[r] = fsub(d[r], sh);
      run_op(OP_SUB);
      check_matrix("after SUB");
      // on odd rounds, change one diagonal element as a sweep would
      if (t % 2 == 1) begin
        int r;
        r = $urandom % N;
        d[r] = fadd(d[r], FP_ONE);
        ram.mem[r*N + r] = d[r];
      end
      // ADD
      for (int r = 0; r < N; r++) d[r] = fadd(d[r], sh);
      run_op(OP_ADD);
      check_matrix("after ADD");
      // CONV against the diagonal saved by SUB
      begin
        bit same;
        same = 1'b1;
        for (int r = 0; r < N; r++) if (d[r] != prev_d[r]) same = 1'b0;
        run_op(OP_CONV);
        check(converged == same, $sformatf("converged %0d, expected %0d", converged, same));
        if (same) n_conv++; else n_noconv++;
      end
      // SAVE then CONV with nothing changed
      run_op(OP_SAVE);
      run_op(OP_CONV);
      check(converged, "CONV right after SAVE must report convergence");
    end
    check(n_fix > 0 && n_noconv > 0, "shift correction or non-convergence never exercised");
    $display("shift corrections %0d, converged %0d, not converged %0d", n_fix, n_conv, n_noconv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
