// jcb_kernel: eigenvalues and eigenvectors of a real symmetric matrix by
// the Jacobi eigenvalue method with a pivot table ("JCB_Symm").
//
// Host interface and memory layout are those of qr_kernel.  After ap_start
// the kernel
//   1. loads the matrix into on-chip RAM A and sets RAM V to the identity;
//   2. fills the pivot table: for each row k < n-1 the column of its
//      largest element right of the diagonal (jcb_update_pivot);
//   3. iterates until convergence:
//        keep the diagonal; pick the pivot (k, l) as the row whose table
//        entry holds the largest magnitude (jcb_find_largest);
//        if a(k,l) != 0: (s, c) from a(k,k), a(l,k), a(l,l)
//        (jcb_calc_givens); A <- G A G^T with a(k,l) = a(l,k) = 0 and
//        V <- V G^T in parallel; rescan the table rows k and, unless l is
//        the last row, l;
//        converged when the diagonal is unchanged bit for bit;
//   4. writes the diagonal (eigenvalues) to out_matrix1 and V
//      (eigenvectors as columns) to out_matrix2, and raises ap_done.
// One off-diagonal element is eliminated per iteration.  The flow, the
// pivot table and its partial refresh, the rotation formulas and the
// convergence rule are the original kernel's; the schedule, the
// single-beat memory ports and the MAX_ITER guard are this design's.
//
// An iteration costs about n (find) + 160 (sin/cos) + 4n (rotation) +
// 2n (two row rescans, on average less) + 2n (diagonal save and compare)
// cycles.  iterations reports the loop count of the last run.  dim must be
// between 2 and MAX_DIM.
module jcb_kernel
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

  localparam logic [2:0] OP_SAVE = 3'd3;
  localparam logic [2:0] OP_CONV = 3'd4;
  localparam int         PW      = (MAX_DIM > 1) ? $clog2(MAX_DIM) : 1;

  typedef enum logic [4:0] {
    S_IDLE, S_LOAD, S_LOAD_W, S_PV, S_PV_W, S_SAVE, S_SAVE_W, S_FIND, S_FIND_W,
    S_RD, S_GIV, S_GIV_W, S_ROT, S_ROT_W, S_UPK, S_UPK_W, S_UPL, S_UPL_W,
    S_CONV, S_CONV_W, S_STORE, S_STORE_W, S_DONE
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

  state_t      state_q;
  idx_t        dim_q, r_q, k_q, l_q;
  fp32_t       akl_q;
  logic        gag_done_q, ag_done_q;
  logic [31:0] iter_q;
  idx_t        pv_q [MAX_DIM];    // pivot column of each row

  assign ap_idle    = (state_q == S_IDLE);
  assign iterations = iter_q;

  // ---------------------------------------------------------------- storage
  ram_req_t [1:0] a_req, v_req, io_a_req, io_v_req, gag_req, ag_req, diag_req;
  ram_req_t [1:0] piv_req, find_req, own_req;
  fp32_t    [1:0] a_rdata, v_rdata;

  mat_ram #(.DEPTH(MAX_DIM * MAX_DIM)) u_a (.clk, .req(a_req), .rdata(a_rdata));
  mat_ram #(.DEPTH(MAX_DIM * MAX_DIM)) u_v (.clk, .req(v_req), .rdata(v_rdata));

  // Only one unit drives a RAM at a time; idle units drive RAM_IDLE (zero).
  assign a_req = io_a_req | gag_req | diag_req | piv_req | find_req | own_req;
  assign v_req = io_v_req | ag_req;

  // ---------------------------------------------------------------- units
  logic  io_start, io_store, io_busy, io_done;
  logic  giv_start, giv_busy, giv_done;
  logic  rot_start, gag_busy, gag_done, ag_busy, ag_done;
  logic  diag_start, diag_busy, diag_done, diag_conv;
  logic  piv_start, piv_busy, piv_done;
  logic  find_start, find_busy, find_done;
  logic [2:0] diag_op;
  fp32_t giv_s, giv_c, diag_shift, find_akl;
  idx_t  piv_row, piv_col, find_k, find_l, pv_row, pv_col;

  kernel_io u_io (
    .clk, .rst_n(krst_n), .start(io_start), .store(io_store), .dim(dim_q),
    .in_addr, .out1_addr, .out2_addr,
    .a_req(io_a_req), .a_rdata, .v_req(io_v_req), .v_rdata,
    .gmem_m, .gmem_s, .gmem1_m, .gmem1_s, .busy(io_busy), .done(io_done)
  );

  jcb_update_pivot u_piv (
    .clk, .rst_n(krst_n), .start(piv_start), .dim(dim_q), .k(piv_row),
    .req(piv_req), .rdata(a_rdata), .busy(piv_busy), .done(piv_done), .col(piv_col)
  );

  jcb_find_largest u_find (
    .clk, .rst_n(krst_n), .start(find_start), .dim(dim_q), .pv_row, .pv_col,
    .req(find_req), .rdata(a_rdata), .busy(find_busy), .done(find_done),
    .k(find_k), .l(find_l), .akl(find_akl)
  );

  assign pv_col = pv_q[pv_row[PW-1:0]];

  jcb_calc_givens u_giv (
    .clk, .rst_n(krst_n), .start(giv_start), .e1(a_rdata[0]), .e2(akl_q), .e3(a_rdata[1]),
    .busy(giv_busy), .done(giv_done), .s(giv_s), .c(giv_c)
  );

  givens_gag u_gag (
    .clk, .rst_n(krst_n), .start(rot_start), .zero_ij(1'b1), .dim(dim_q),
    .i(k_q), .j(l_q), .c(giv_c), .s(giv_s),
    .req(gag_req), .rdata(a_rdata), .busy(gag_busy), .done(gag_done)
  );

  givens_ag u_ag (
    .clk, .rst_n(krst_n), .start(rot_start), .by_row(1'b0), .dim(dim_q),
    .i(k_q), .j(l_q), .c(giv_c), .s(giv_s),
    .req(ag_req), .rdata(v_rdata), .busy(ag_busy), .done(ag_done)
  );

  diag_unit #(.MAX_DIM(MAX_DIM)) u_diag (
    .clk, .rst_n(krst_n), .start(diag_start), .op(diag_op), .dim(dim_q),
    .req(diag_req), .rdata(a_rdata), .busy(diag_busy), .done(diag_done),
    .shift(diag_shift), .converged(diag_conv)
  );

  // ---------------------------------------------------------------- sequencing
  always_comb begin
    io_start   = (state_q == S_LOAD) || (state_q == S_STORE);
    io_store   = (state_q == S_STORE);
    giv_start  = (state_q == S_GIV);
    rot_start  = (state_q == S_ROT);
    piv_start  = (state_q == S_PV) || (state_q == S_UPK) || (state_q == S_UPL);
    find_start = (state_q == S_FIND);
    diag_start = (state_q == S_SAVE) || (state_q == S_CONV);
    diag_op    = (state_q == S_CONV) ? OP_CONV : OP_SAVE;
    unique case (state_q)
      S_UPK, S_UPK_W: piv_row = k_q;
      S_UPL, S_UPL_W: piv_row = l_q;
      default:        piv_row = r_q;
    endcase
    own_req = '{default: RAM_IDLE};
    if (state_q == S_RD) begin
      own_req[0] = '{en: 1'b1, we: 1'b0, addr: mat_addr(k_q, k_q, dim_q), wdata: FP_ZERO};
      own_req[1] = '{en: 1'b1, we: 1'b0, addr: mat_addr(l_q, l_q, dim_q), wdata: FP_ZERO};
    end
  end

  assign ap_ready = (state_q == S_IDLE) && ap_start;
  assign ap_done  = (state_q == S_DONE);

  always_ff @(posedge clk) begin
    if (piv_done) pv_q[piv_row[PW-1:0]] <= piv_col;
  end

  always_ff @(posedge clk or negedge krst_n) begin
    if (!krst_n) begin
      state_q    <= S_IDLE;
      dim_q      <= '0;
      r_q        <= '0;
      k_q        <= '0;
      l_q        <= '0;
      akl_q      <= FP_ZERO;
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
          r_q     <= '0;
          state_q <= S_PV;
        end
        S_PV:   state_q <= S_PV_W;
        S_PV_W: if (piv_done) begin
          if (r_q == dim_q - idx_t'(2)) state_q <= S_SAVE;
          else begin
            r_q     <= r_q + idx_t'(1);
            state_q <= S_PV;
          end
        end
        S_SAVE:   state_q <= S_SAVE_W;
        S_SAVE_W: if (diag_done) state_q <= S_FIND;
        S_FIND:   state_q <= S_FIND_W;
        S_FIND_W: if (find_done) begin
          k_q     <= find_k;
          l_q     <= find_l;
          akl_q   <= find_akl;
          state_q <= fp_is_zero(find_akl) ? S_CONV : S_RD;
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
          if ((gag_done || gag_done_q) && (ag_done || ag_done_q)) state_q <= S_UPK;
        end
        S_UPK:   state_q <= S_UPK_W;
        S_UPK_W: if (piv_done) state_q <= (l_q != dim_q - idx_t'(1)) ? S_UPL : S_CONV;
        S_UPL:   state_q <= S_UPL_W;
        S_UPL_W: if (piv_done) state_q <= S_CONV;
        S_CONV:   state_q <= S_CONV_W;
        S_CONV_W: if (diag_done) begin
          iter_q <= iter_q + 32'd1;
          if (diag_conv || iter_q + 32'd1 >= 32'(MAX_ITER)) state_q <= S_STORE;
          else                                               state_q <= S_SAVE;
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
                   $onehot0({io_a_req[0].en, gag_req[0].en, diag_req[0].en, piv_req[0].en,
                             find_req[0].en, own_req[0].en}));
  // A port that is not enabled must drive all zeros, or the OR merge of the
  // requests would corrupt the active requester's address.
  for (genvar p = 0; p < 2; p++) begin : g_idle_chk
    assert property (@(posedge clk) disable iff (!krst_n)
                     (a_req[p].en || a_req[p] == RAM_IDLE) && (v_req[p].en || v_req[p] == RAM_IDLE));
  end

endmodule
