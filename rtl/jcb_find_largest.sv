// jcb_find_largest: selects the Jacobi pivot from the per-row pivot table
// ("JCB_findLargest").
//
// For every row r < dim-1 the kernel's table holds the column pv(r) of
// that row's largest off-diagonal element.  The unit looks up each entry
// (pv_row out, pv_col back, combinationally), reads a(r, pv(r)) and keeps
// the first row whose element has the strictly largest magnitude.  It
// returns the pivot position (k, l) and the element itself, so that the
// kernel can skip the rotation when the pivot is zero.  Because the table
// is refreshed only for the two rows a rotation touches, the chosen element
// can differ from the true largest; that is the original method's own
// approximation.
//
// Timing: start (pulse) latches dim; one row per cycle on RAM port 0;
// done pulses with k, l and akl valid dim+1 cycles after start.
module jcb_find_largest
  import eig_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  idx_t           dim,
  output idx_t           pv_row,
  input  idx_t           pv_col,
  output ram_req_t [1:0] req,
  input  fp32_t    [1:0] rdata,
  output logic           busy,
  output logic           done,
  output idx_t           k,
  output idx_t           l,
  output fp32_t          akl
);

  logic  run_q, issue_q, cmp_q, first_q;
  idx_t  dim_q, rd_row_q, cmp_row_q, cmp_col_q;

  assign pv_row = rd_row_q;

  always_comb begin
    req    = '{default: RAM_IDLE};
    // Zero when idle: the kernel ORs all units' requests together.
    if (issue_q) req[0] = '{en: 1'b1, we: 1'b0, addr: mat_addr(rd_row_q, pv_col, dim_q), wdata: FP_ZERO};
  end

  assign busy = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      issue_q   <= 1'b0;
      cmp_q     <= 1'b0;
      first_q   <= 1'b0;
      dim_q     <= '0;
      rd_row_q  <= '0;
      cmp_row_q <= '0;
      cmp_col_q <= '0;
      k         <= '0;
      l         <= '0;
      akl       <= FP_ZERO;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q    <= 1'b1;
          issue_q  <= 1'b1;
          first_q  <= 1'b1;
          dim_q    <= dim;
          rd_row_q <= '0;
        end
      end else begin
        cmp_q     <= issue_q;
        cmp_row_q <= rd_row_q;
        cmp_col_q <= pv_col;
        if (issue_q) begin
          if (rd_row_q == dim_q - idx_t'(2)) issue_q <= 1'b0;
          else                               rd_row_q <= rd_row_q + idx_t'(1);
        end
        if (cmp_q) begin
          first_q <= 1'b0;
          if (first_q || fp_mag_gt(rdata[0], akl)) begin
            akl <= rdata[0];
            k   <= cmp_row_q;
            l   <= cmp_col_q;
          end
          if (!issue_q) begin
            run_q <= 1'b0;
            done  <= 1'b1;
          end
        end
      end
    end
  end

endmodule
