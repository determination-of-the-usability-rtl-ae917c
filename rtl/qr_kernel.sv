// qr_kernel: eigenvalues and eigenvectors of a real symmetric matrix by
// the shifted QR algorithm ("QR_Symm").
//
// The host writes the matrix address, the two result addresses and the
// dimension into the control registers (axil_ctrl) and sets ap_start.  The
// kernel then
//   1. loads the matrix into on-chip RAM A and sets RAM V to the identity;
//   2. reduces A to Hessenberg form - tridiagonal, since A is symmetric -
//      with Givens rotations: for each column p-1 = 0..n-3 and each row
//      q = p+1..n-1 it rotates rows/columns p and q to clear a(q, p-1);
//   3. iterates until convergence:
//        shift <- a(n-1,n-1), minus one if another diagonal element
//                 equals it; subtract shift from the diagonal (keeping the
//                 old diagonal);
//        for i = 0..n-2: rotation (s, c) from a(i,i) and a(i+1,i);
//                 A <- G A G^T and V <- V G^T, run in parallel;
//        add the shift back; converged when the diagonal is unchanged
//        bit for bit;
//   4. writes the diagonal (eigenvalues) to out_matrix1 and V
//      (eigenvectors as columns) to out_matrix2, and raises ap_done.
// The flow, the shift rule, the rotation formulas and the convergence
// rule are the original kernel's; the schedule of the units, the
// single-beat memory ports and the MAX_ITER guard are this design's.
//
// Every rotation step is sequential: the Givens calculation takes about
// 94 cycles, the two passes of G A G^T about 4n cycles (V G^T runs
// alongside in 2n).  One QR iteration therefore costs roughly
// (n-1) * (4n + 100) + 3n cycles.  iterations reports the number of loop
// iterations of the last run.  dim must be between 2 and MAX_DIM.
module qr_kernel
  import eig_pkg::*;
#(
  parameter int MAX_DIM  = 500,
  parameter int MAX_ITER = 1_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_m2s_t   ctrl_in,
  output axil_s2m_t   ctrl_out,
  output axi_m2s_t    gmem_m,
  input  axi_s2m_t    gmem_s,
  output axi_m2s_t    gmem1_m,
  input  axi_s2m_t    gmem1_s,
  output logic        irq,
  output logic [31:0] iterations
);

  localparam logic [2:0] OP_SHIFT = 3'd0;
  localparam logic [2:0] OP_SUB   = 3'd1;
  localparam logic [2:0] OP_ADD   = 3'd2;
  localparam logic [2:0] OP_CONV  = 3'd4;

  typedef enum logic [4:0] {
    S_IDLE, S_LOAD, S_LOAD_W, S_H_NEXT, S_RD, S_GIV, S_GIV_W, S_ROT, S_ROT_W,
    S_SHIFT, S_SHIFT_W, S_SUB, S_SUB_W, S_SWEEP, S_ADD, S_ADD_W, S_CONV, S_CONV_W,
    S_STORE, S_STORE_W, S_DONE
  } state_t;

  // ---------------------------------------------------------------- control
  logic        ap_start, ap_reset, ap_done, ap_ready, ap_idle, krst_n;
  logic [31:0] in_addr, out1_addr, out2_addr, dim_reg;

  axil_ctrl u_ctrl (
    .clk, .rst_n, .s_in(ctrl_in), .s_out(ctrl_out),
    .ap_start, .ap_reset, .ap_done_pulse(ap_done), .ap_ready_pulse(ap_ready), .ap_idle,
    .in_addr, .out1_addr, .out2_addr, .dim(dim_reg), .irq
  );

  assign krst_n = rst_n && !ap_reset;

  state_t state_q;
  logic   hess_q;                 // 1 while reducing to Hessenberg form
  idx_t   dim_q, p_q, q_q, i_q;
  logic   gag_done_q, ag_done_q;
  logic [31:0] iter_q;

  assign ap_idle    = (state_q == S_IDLE);
  assign iterations = iter_q;

  // ---------------------------------------------------------------- storage
  ram_req_t [1:0] a_req, v_req, io_a_req, io_v_req, gag_req, ag_req, diag_req, own_req;
  fp32_t    [1:0] a_rdata, v_rdata;

  mat_ram #(.DEPTH(MAX_DIM * MAX_DIM)) u_a (.clk, .req(a_req), .rdata(a_rdata));
  mat_ram #(.DEPTH(MAX_DIM * MAX_DIM)) u_v (.clk, .req(v_req), .rdata(v_rdata));

  // Only one unit drives a RAM at a time; idle units drive RAM_IDLE (zero),
  // so the requests merge by OR.
  assign a_req = io_a_req | gag_req | diag_req | own_req;
  assign v_req = io_v_req | ag_req;

  // ---------------------------------------------------------------- units
  logic  io_start, io_store, io_busy, io_done;
  logic  giv_start, giv_busy, giv_done;
  logic  rot_start, gag_busy, gag_done, ag_busy, ag_done;
  logic  diag_start, diag_busy, diag_done, diag_conv;
  logic [2:0] diag_op;
  fp32_t giv_s, giv_c, shift;

  kernel_io u_io (
    .clk, .rst_n(krst_n), .start(io_start), .store(io_store), .dim(dim_q),
    .in_addr, .out1_addr, .out2_addr,
    .a_req(io_a_req), .a_rdata, .v_req(io_v_req), .v_rdata,
    .gmem_m, .gmem_s, .gmem1_m, .gmem1_s, .busy(io_busy), .done(io_done)
  );

  qr_calc_givens u_giv (
    .clk, .rst_n(krst_n), .start(giv_start), .e1(a_rdata[0]), .e2(a_rdata[1]),
    .busy(giv_busy), .done(giv_done), .s(giv_s), .c(giv_c)
  );

  givens_gag u_gag (
    .clk, .rst_n(krst_n), .start(rot_start), .zero_ij(1'b0), .dim(dim_q),
    .i(hess_q ? p_q : i_q), .j(hess_q ? q_q : i_q + idx_t'(1)), .c(giv_c), .s(giv_s),
    .req(gag_req), .rdata(a_rdata), .busy(gag_busy), .done(gag_done)
  );

  givens_ag u_ag (
    .clk, .rst_n(krst_n), .start(rot_start), .by_row(1'b0), .dim(dim_q),
    .i(hess_q ? p_q : i_q), .j(hess_q ? q_q : i_q + idx_t'(1)), .c(giv_c), .s(giv_s),
    .req(ag_req), .rdata(v_rdata), .busy(ag_busy), .done(ag_done)
  );

  diag_unit #(.MAX_DIM(MAX_DIM)) u_diag (
    .clk, .rst_n(krst_n), .start(diag_start), .op(diag_op), .dim(dim_q),
    .req(diag_req), .rdata(a_rdata), .busy(diag_busy), .done(diag_done),
    .shift, .converged(diag_conv)
  );

  // ---------------------------------------------------------------- sequencing
  always_comb begin
    io_start   = (state_q == S_LOAD) || (state_q == S_STORE);
    io_store   = (state_q == S_STORE);
    giv_start  = (state_q == S_GIV);
    rot_start  = (state_q == S_ROT);
    diag_start = (state_q == S_SHIFT) || (state_q == S_SUB) ||
                 (state_q == S_ADD)   || (state_q == S_CONV);
    unique case (state_q)
      S_SUB:   diag_op = OP_SUB;
      S_ADD:   diag_op = OP_ADD;
      S_CONV:  diag_op = OP_CONV;
      default: diag_op = OP_SHIFT;
    endcase
    // element pair for the next rotation: Hessenberg a(p,p-1), a(q,p-1);
    // QR sweep a(i,i), a(i+1,i)
    own_req = '{default: RAM_IDLE};
    if (state_q == S_RD) begin
      if (hess_q) begin
        own_req[0] = '{en: 1'b1, we: 1'b0, addr: mat_addr(p_q, p_q - idx_t'(1), dim_q), wdata: FP_ZERO};
        own_req[1] = '{en: 1'b1, we: 1'b0, addr: mat_addr(q_q, p_q - idx_t'(1), dim_q), wdata: FP_ZERO};
      end else begin
        own_req[0] = '{en: 1'b1, we: 1'b0, addr: mat_addr(i_q, i_q, dim_q), wdata: FP_ZERO};
        own_req[1] = '{en: 1'b1, we: 1'b0, addr: mat_addr(i_q + idx_t'(1), i_q, dim_q), wdata: FP_ZERO};
      end
    end
  end

  assign ap_ready = (state_q == S_IDLE) && ap_start;
  assign ap_done  = (state_q == S_DONE);

  always_ff @(posedge clk or negedge krst_n) begin
    if (!krst_n) begin
      state_q    <= S_IDLE;
      hess_q     <= 1'b0;
      dim_q      <= '0;
      p_q        <= '0;
      q_q        <= '0;
      i_q        <= '0;
      gag_done_q <= 1'b0;
      ag_done_q  <= 1'b0;
      iter_q     <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (ap_start) begin
          dim_q   <= idx_t'(dim_reg);
          iter_q  <= '0;
          state_q <= S_LOAD;
        end
        S_LOAD:   state_q <= S_LOAD_W;
        S_LOAD_W: if (io_done) begin
          hess_q  <= 1'b1;
          p_q     <= idx_t'(1);
          q_q     <= idx_t'(2);
          state_q <= (dim_q > idx_t'(2)) ? S_RD : S_SHIFT;
        end
        S_H_NEXT: begin                       // next (p, q) of the reduction
          if (q_q != dim_q - idx_t'(1)) begin
            q_q     <= q_q + idx_t'(1);
            state_q <= S_RD;
          end else if (p_q < dim_q - idx_t'(2)) begin
            p_q     <= p_q + idx_t'(1);
            q_q     <= p_q + idx_t'(2);
            state_q <= S_RD;
          end else begin
            hess_q  <= 1'b0;
            state_q <= S_SHIFT;
          end
        end
        S_RD:    state_q <= S_GIV;
        S_GIV:   state_q <= S_GIV_W;
        S_GIV_W: if (giv_done) state_q <= S_ROT;
        S_ROT: begin
          gag_done_q <= 1'b0;
          ag_done_q  <= 1'b0;
          state_q    <= S_ROT_W;
        end
        S_ROT_W: begin
          if (gag_done) gag_done_q <= 1'b1;
          if (ag_done)  ag_done_q  <= 1'b1;
          if ((gag_done || gag_done_q) && (ag_done || ag_done_q))
            state_q <= hess_q ? S_H_NEXT : S_SWEEP;
        end
        S_SHIFT:   state_q <= S_SHIFT_W;
        S_SHIFT_W: if (diag_done) state_q <= S_SUB;
        S_SUB:     state_q <= S_SUB_W;
        S_SUB_W:   if (diag_done) begin
          i_q     <= '0;
          state_q <= S_RD;
        end
        S_SWEEP: begin                        // after rotation (i, i+1)
          if (i_q == dim_q - idx_t'(2)) state_q <= S_ADD;
          else begin
            i_q     <= i_q + idx_t'(1);
            state_q <= S_RD;
          end
        end
        S_ADD:    state_q <= S_ADD_W;
        S_ADD_W:  if (diag_done) state_q <= S_CONV;
        S_CONV:   state_q <= S_CONV_W;
        S_CONV_W: if (diag_done) begin
          iter_q <= iter_q + 32'd1;
          if (diag_conv || iter_q + 32'd1 >= 32'(MAX_ITER)) state_q <= S_STORE;
          else                                               state_q <= S_SHIFT;
        end
        S_STORE:   state_q <= S_STORE_W;
        S_STORE_W: if (io_done) state_q <= S_DONE;
        S_DONE:    state_q <= S_IDLE;
        default:   state_q <= S_IDLE;
      endcase
    end
  end

  // At most one requester per RAM port.
  assert property (@(posedge clk) disable iff (!krst_n)
                   $onehot0({io_a_req[0].en, gag_req[0].en, diag_req[0].en, own_req[0].en}));
  assert property (@(posedge clk) disable iff (!krst_n)
                   $onehot0({io_a_req[1].en, gag_req[1].en, diag_req[1].en, own_req[1].en}));
  // A port that is not enabled must drive all zeros, or the OR merge of the
  // requests would corrupt the active requester's address.
  for (genvar p = 0; p < 2; p++) begin : g_idle_chk
    assert property (@(posedge clk) disable iff (!krst_n)
                     (a_req[p].en || a_req[p] == RAM_IDLE) && (v_req[p].en || v_req[p] == RAM_IDLE));
  end

endmodule
