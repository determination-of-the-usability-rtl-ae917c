// diag_unit: diagonal operations of the two iterative loops - the QR
// shift ("QR_checkdiagonal"), applying and removing it, and the
// convergence test ("QR_convergence", "JCB_convergence").
//
// Operations, selected by op when start pulses:
//   OP_SHIFT  shift <- a(n-1,n-1); if some other diagonal element equals
//             it exactly, shift <- shift - 1.
//   OP_SUB    old(i) <- a(i,i); a(i,i) <- a(i,i) - shift, for all i.
//   OP_ADD    a(i,i) <- a(i,i) + shift, for all i.
//   OP_SAVE   old(i) <- a(i,i), for all i.
//   OP_CONV   converged <- (a(i,i) == old(i) bit for bit, for all i).
// The shift value a_nn, the decrement by one when the check fires, and
// the convergence rule (the diagonal did not change in one iteration) are
// the original method's.  What the check tests is not spelled out there;
// this unit fires it when the shift equals another diagonal element.
//
// Timing: one diagonal element per cycle; reads on RAM port 0, writes a
// cycle later on port 1.  done pulses dim+3 cycles after start (dim+4 for
// OP_SHIFT).  shift and converged hold until changed by another operation.
module diag_unit
  import eig_pkg::*;
#(
  parameter int MAX_DIM = 500
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2:0]     op,
  input  idx_t           dim,
  output ram_req_t [1:0] req,
  input  fp32_t    [1:0] rdata,
  output logic           busy,
  output logic           done,
  output fp32_t          shift,
  output logic           converged
);

  localparam logic [2:0] OP_SHIFT = 3'd0;
  localparam logic [2:0] OP_SUB   = 3'd1;
  localparam logic [2:0] OP_ADD   = 3'd2;
  localparam logic [2:0] OP_SAVE  = 3'd3;
  localparam logic [2:0] OP_CONV  = 3'd4;

  typedef enum logic [2:0] {S_IDLE, S_LAST, S_LAST_WAIT, S_SCAN, S_FIN} state_t;

  state_t     state_q;
  logic [2:0] op_q;
  idx_t       dim_q, rd_q, cmp_idx_q;
  logic       issue_q, cmp_q, hit_q;
  fp32_t      old_q [MAX_DIM];
  fp32_t      add_a, add_b, add_y;

  fp32_add u_add (.a(add_a), .b(add_b), .y(add_y));

  always_comb begin
    add_a = rdata[0];
    add_b = (op_q == OP_SUB) ? fp_neg(shift) : shift;
    if (state_q == S_FIN) begin
      add_a = shift;
      add_b = fp_neg(FP_ONE);
    end
  end

  always_comb begin
    req = '{default: RAM_IDLE};
    if (state_q == S_LAST)
      req[0] = '{en: 1'b1, we: 1'b0, addr: mat_addr(dim_q - idx_t'(1), dim_q - idx_t'(1), dim_q),
                 wdata: FP_ZERO};
    else if (state_q == S_SCAN) begin
      // Requests are zeroed when not enabled: the kernel ORs all units'
      // requests together, so an idle port must drive RAM_IDLE.
      if (issue_q)
        req[0] = '{en: 1'b1, we: 1'b0, addr: mat_addr(rd_q, rd_q, dim_q), wdata: FP_ZERO};
      if (cmp_q && (op_q == OP_SUB || op_q == OP_ADD))
        req[1] = '{en: 1'b1, we: 1'b1, addr: mat_addr(cmp_idx_q, cmp_idx_q, dim_q), wdata: add_y};
    end
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (state_q == S_SCAN && cmp_q && (op_q == OP_SUB || op_q == OP_SAVE))
      old_q[cmp_idx_q] <= rdata[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      op_q      <= OP_SHIFT;
      dim_q     <= '0;
      rd_q      <= '0;
      cmp_idx_q <= '0;
      issue_q   <= 1'b0;
      cmp_q     <= 1'b0;
      hit_q     <= 1'b0;
      shift     <= FP_ZERO;
      converged <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          op_q    <= op;
          dim_q   <= dim;
          rd_q    <= '0;
          cmp_q   <= 1'b0;
          hit_q   <= 1'b0;
          issue_q <= 1'b1;
          if (op == OP_CONV) converged <= 1'b1;
          state_q <= (op == OP_SHIFT) ? S_LAST : S_SCAN;
        end
        S_LAST:      state_q <= S_LAST_WAIT;
        S_LAST_WAIT: begin
          shift   <= rdata[0];
          state_q <= (dim_q > idx_t'(1)) ? S_SCAN : S_FIN;
        end
        S_SCAN: begin
          cmp_q     <= issue_q;
          cmp_idx_q <= rd_q;
          if (issue_q) begin
            // the shift check scans rows 0..dim-2, the others all rows
            if (rd_q == dim_q - ((op_q == OP_SHIFT) ? idx_t'(2) : idx_t'(1))) issue_q <= 1'b0;
            else rd_q <= rd_q + idx_t'(1);
          end
          if (cmp_q) begin
            if (op_q == OP_SHIFT && rdata[0] == shift) hit_q <= 1'b1;
            if (op_q == OP_CONV && rdata[0] != old_q[cmp_idx_q]) converged <= 1'b0;
            if (!issue_q) state_q <= S_FIN;
          end
        end
        S_FIN: begin
          if (op_q == OP_SHIFT && hit_q) shift <= add_y;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
