// givens_ag: one rotation pass over a matrix held in a mat_ram.
//
// With by_row = 0 it replaces columns i and j of the matrix M by
// M*G^T (column i <- c*col_i - s*col_j, column j <- s*col_i + c*col_j);
// applied to the eigenvector matrix this is the kernels' "doAG" step, which
// accumulates the product of the transposed Givens matrices.  With
// by_row = 1 it replaces rows i and j by G*M; givens_gag uses both passes
// to form G*A*G^T.
//
// Timing: start (one-cycle pulse, ignored while busy) latches the
// arguments.  Each element pair takes two cycles: both words are read on
// the two RAM ports, then rotated by givens_rot and written back on the
// same ports.  done pulses one cycle after the last write, 2*dim + 1
// cycles after start.  The pass is elementwise sequential; the original
// HLS code unrolled this loop by two, a throughput choice left out here.
module givens_ag
  import eig_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           by_row,
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

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR} state_t;

  state_t state_q;
  logic   row_q;
  idx_t   dim_q, i_q, j_q, k_q;
  fp32_t  c_q, s_q, xo, yo;
  addr_t  addr_x, addr_y;

  assign addr_x = row_q ? mat_addr(i_q, k_q, dim_q) : mat_addr(k_q, i_q, dim_q);
  assign addr_y = row_q ? mat_addr(j_q, k_q, dim_q) : mat_addr(k_q, j_q, dim_q);

  givens_rot u_rot (.c(c_q), .s(s_q), .x(rdata[0]), .y(rdata[1]), .xo(xo), .yo(yo));

  always_comb begin
    req = '{default: RAM_IDLE};
    if (state_q == S_RD) begin
      req[0] = '{en: 1'b1, we: 1'b0, addr: addr_x, wdata: FP_ZERO};
      req[1] = '{en: 1'b1, we: 1'b0, addr: addr_y, wdata: FP_ZERO};
    end else if (state_q == S_WR) begin
      req[0] = '{en: 1'b1, we: 1'b1, addr: addr_x, wdata: xo};
      req[1] = '{en: 1'b1, we: 1'b1, addr: addr_y, wdata: yo};
    end
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      row_q   <= 1'b0;
      dim_q   <= '0;
      i_q     <= '0;
      j_q     <= '0;
      k_q     <= '0;
      c_q     <= FP_ONE;
      s_q     <= FP_ZERO;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          row_q   <= by_row;
          dim_q   <= dim;
          i_q     <= i;
          j_q     <= j;
          c_q     <= c;
          s_q     <= s;
          k_q     <= '0;
          state_q <= S_RD;
        end
        S_RD: state_q <= S_WR;
        S_WR: begin
          if (k_q == dim_q - idx_t'(1)) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            k_q     <= k_q + idx_t'(1);
            state_q <= S_RD;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
