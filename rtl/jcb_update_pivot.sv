// jcb_update_pivot: finds the pivot of one row of the working matrix
// ("update_pivot_in_row").
//
// The Jacobi kernel keeps, for every row k < dim-1, the column of its
// largest off-diagonal element to the right of the diagonal, so that the
// global pivot can be found by scanning dim-1 entries instead of the whole
// triangle.  This unit rescans row k: it reads a_k,k+1 .. a_k,dim-1 and
// returns in col the first column holding the largest magnitude.  k must
// be below dim-1.
//
// Timing: start (pulse) latches dim and k; one word is read per cycle on
// RAM port 0 (port 1 stays idle) and compared the cycle after; done pulses
// with col valid at most dim-k+3 cycles after start.  col holds until the next
// start.
module jcb_update_pivot
  import eig_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  idx_t           dim,
  input  idx_t           k,
  output ram_req_t [1:0] req,
  input  fp32_t    [1:0] rdata,
  output logic           busy,
  output logic           done,
  output idx_t           col
);

  logic  run_q, issue_q, cmp_q, first_q;
  idx_t  dim_q, k_q, rd_col_q, cmp_col_q;
  fp32_t best_q;

  always_comb begin
    req    = '{default: RAM_IDLE};
    // Zero when idle: the kernel ORs all units' requests together.
    if (issue_q) req[0] = '{en: 1'b1, we: 1'b0, addr: mat_addr(k_q, rd_col_q, dim_q), wdata: FP_ZERO};
  end

  assign busy = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      issue_q   <= 1'b0;
      cmp_q     <= 1'b0;
      first_q   <= 1'b0;
      dim_q     <= '0;
      k_q       <= '0;
      rd_col_q  <= '0;
      cmp_col_q <= '0;
      best_q    <= FP_ZERO;
      col       <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q    <= 1'b1;
          issue_q  <= 1'b1;
          first_q  <= 1'b1;
          dim_q    <= dim;
          k_q      <= k;
          rd_col_q <= k + idx_t'(1);
        end
      end else begin
        // issue stage
        cmp_q     <= issue_q;
        cmp_col_q <= rd_col_q;
        if (issue_q) begin
          if (rd_col_q == dim_q - idx_t'(1)) issue_q <= 1'b0;
          else                               rd_col_q <= rd_col_q + idx_t'(1);
        end
        // compare stage
        if (cmp_q) begin
          first_q <= 1'b0;
          if (first_q || fp_mag_gt(rdata[0], best_q)) begin
            best_q <= rdata[0];
            col    <= cmp_col_q;
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
