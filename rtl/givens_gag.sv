// givens_gag: similarity transform of the working matrix by one Givens
// rotation, A <- G*A*G^T ("doGAG" in both kernels).
//
// G = G(i, j) has c at (i,i) and (j,j), -s at (i,j) and s at (j,i).  The
// transform is done as the textbook derivation writes it: a row pass
// (rows i and j <- G*A) followed by a column pass (columns i and j <- A*G^T),
// both by one givens_ag engine.  Only rows and columns i and j change.  In
// the Jacobi kernel the rotation is chosen so that element (i,j) becomes
// zero; with zero_ij = 1 that element and its mirror (j,i) are then
// written as exact zeros rather than as the rounding residue.  The QR
// kernel leaves zero_ij = 0.
//
// Timing: start (pulse) latches the arguments; the two passes take
// 2*dim + 1 cycles each, the optional zeroing one more; done pulses for
// one cycle at the end, 4*dim + 6 cycles after start (4*dim + 7 with the zeroing).
module givens_gag
  import eig_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           zero_ij,
  input  idx_t           dim,
  input  idx_t           i,
  input  idx_t           j,
  input  fp32_t          c,
  input  fp32_t          s,
  output ram_req_t [1:0] req,
  input  fp32_t    [1:0] rdata,
  output logic           busy,
  output logic           done
);

  typedef enum logic [2:0] {S_IDLE, S_ROWS, S_COLS, S_ZERO, S_DONE} state_t;

  state_t         state_q;
  logic           zero_q;
  idx_t           dim_q, i_q, j_q;
  fp32_t          c_q, s_q;
  logic           pass_start, pass_row, pass_busy, pass_done;
  ram_req_t [1:0] pass_req;

  givens_ag u_pass (
    .clk, .rst_n,
    .start(pass_start), .by_row(pass_row),
    .dim(dim_q), .i(i_q), .j(j_q), .c(c_q), .s(s_q),
    .req(pass_req), .rdata,
    .busy(pass_busy), .done(pass_done)
  );

  logic launch_q;   // one-cycle pulse starting the pass of the current state
  assign pass_start = launch_q;
  assign pass_row   = (state_q == S_ROWS);

  always_comb begin
    req = pass_req;
    if (state_q == S_ZERO) begin
      req[0] = '{en: 1'b1, we: 1'b1, addr: mat_addr(i_q, j_q, dim_q), wdata: FP_ZERO};
      req[1] = '{en: 1'b1, we: 1'b1, addr: mat_addr(j_q, i_q, dim_q), wdata: FP_ZERO};
    end
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      launch_q <= 1'b0;
      zero_q   <= 1'b0;
      dim_q    <= '0;
      i_q      <= '0;
      j_q      <= '0;
      c_q      <= FP_ONE;
      s_q      <= FP_ZERO;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      launch_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          zero_q   <= zero_ij;
          dim_q    <= dim;
          i_q      <= i;
          j_q      <= j;
          c_q      <= c;
          s_q      <= s;
          launch_q <= 1'b1;
          state_q  <= S_ROWS;
        end
        S_ROWS: if (pass_done) begin
          launch_q <= 1'b1;
          state_q  <= S_COLS;
        end
        S_COLS: if (pass_done) state_q <= zero_q ? S_ZERO : S_DONE;
        S_ZERO: state_q <= S_DONE;
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The pass engine must be idle whenever a pass is launched.
  assert property (@(posedge clk) disable iff (!rst_n) pass_start |-> !pass_busy);

endmodule
