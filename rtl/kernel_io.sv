// kernel_io: moves matrices between external memory and a kernel's
// on-chip RAMs (the load at kernel start and "doFinal" at the end).
//
// LOAD (start with store = 0) reads the dim x dim input matrix, row-major
// binary32 words from byte address in_addr, over the gmem AXI master into
// the working-matrix RAM, and at the same time initialises the
// eigenvector RAM to the identity.  STORE (store = 1) writes the diagonal
// of the working matrix - the eigenvalues - as dim words to out1_addr,
// then the whole eigenvector matrix, row-major, to out2_addr, both over
// the gmem1 master.  Column k of the eigenvector matrix is the
// eigenvector of eigenvalue k.  The assignment of in_matrix to one memory
// bundle and of both outputs to the other is the original's.
//
// Timing: one word at a time, one AXI transfer outstanding; a word costs
// the AXI round trip plus two cycles.  done pulses for one cycle when the
// last transfer has completed.
module kernel_io
  import eig_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           store,
  input  idx_t           dim,
  input  logic [31:0]    in_addr,
  input  logic [31:0]    out1_addr,
  input  logic [31:0]    out2_addr,
  output ram_req_t [1:0] a_req,
  input  fp32_t    [1:0] a_rdata,
  output ram_req_t [1:0] v_req,
  input  fp32_t    [1:0] v_rdata,
  output axi_m2s_t       gmem_m,
  input  axi_s2m_t       gmem_s,
  output axi_m2s_t       gmem1_m,
  input  axi_s2m_t       gmem1_s,
  output logic           busy,
  output logic           done
);

  typedef enum logic [2:0] {S_IDLE, S_LD_REQ, S_LD_WAIT, S_ST_RD, S_ST_DATA, S_ST_REQ, S_ST_WAIT}
    state_t;

  state_t      state_q;
  logic        vec_q;            // store phase: 0 eigenvalues, 1 eigenvectors
  idx_t        dim_q, r_q, c_q;
  addr_t       cnt_q;
  logic [31:0] base_q;
  fp32_t       word_q;

  logic        rd_valid, rd_ready, rd_resp, rd_err;
  logic [31:0] rd_data;
  logic        wr_valid, wr_ready, wr_resp, wr_err;
  logic [31:0] wr_unused;

  axi_master u_gmem (
    .clk, .rst_n,
    .req_valid(rd_valid), .req_ready(rd_ready), .req_we(1'b0),
    .req_addr(base_q + {cnt_q, 2'b00}), .req_wdata(32'd0),
    .resp_valid(rd_resp), .resp_rdata(rd_data), .resp_err(rd_err),
    .m(gmem_m), .s(gmem_s)
  );

  axi_master u_gmem1 (
    .clk, .rst_n,
    .req_valid(wr_valid), .req_ready(wr_ready), .req_we(1'b1),
    .req_addr(base_q + {cnt_q, 2'b00}), .req_wdata(word_q),
    .resp_valid(wr_resp), .resp_rdata(wr_unused), .resp_err(wr_err),
    .m(gmem1_m), .s(gmem1_s)
  );

  assign rd_valid = (state_q == S_LD_REQ);
  assign wr_valid = (state_q == S_ST_REQ);
  assign busy     = (state_q != S_IDLE);

  addr_t last_cnt;
  assign last_cnt = vec_q ? addr_t'(dim_q) * addr_t'(dim_q) - addr_t'(1) : addr_t'(dim_q) - addr_t'(1);

  always_comb begin
    a_req = '{default: RAM_IDLE};
    v_req = '{default: RAM_IDLE};
    if (state_q == S_LD_WAIT && rd_resp) begin
      a_req[0] = '{en: 1'b1, we: 1'b1, addr: cnt_q, wdata: rd_data};
      v_req[0] = '{en: 1'b1, we: 1'b1, addr: cnt_q, wdata: (r_q == c_q) ? FP_ONE : FP_ZERO};
    end else if (state_q == S_ST_RD) begin
      if (vec_q) v_req[0] = '{en: 1'b1, we: 1'b0, addr: cnt_q, wdata: FP_ZERO};
      else       a_req[0] = '{en: 1'b1, we: 1'b0, addr: mat_addr(idx_t'(cnt_q), idx_t'(cnt_q), dim_q),
                             wdata: FP_ZERO};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      vec_q   <= 1'b0;
      dim_q   <= '0;
      r_q     <= '0;
      c_q     <= '0;
      cnt_q   <= '0;
      base_q  <= '0;
      word_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          dim_q <= dim;
          cnt_q <= '0;
          r_q   <= '0;
          c_q   <= '0;
          vec_q <= 1'b0;
          if (store) begin
            base_q  <= out1_addr;
            state_q <= S_ST_RD;
          end else begin
            base_q  <= in_addr;
            state_q <= S_LD_REQ;
          end
        end
        S_LD_REQ: if (rd_ready) state_q <= S_LD_WAIT;
        S_LD_WAIT: if (rd_resp) begin
          if (cnt_q == addr_t'(dim_q) * addr_t'(dim_q) - addr_t'(1)) begin
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            cnt_q <= cnt_q + addr_t'(1);
            if (c_q == dim_q - idx_t'(1)) begin
              c_q <= '0;
              r_q <= r_q + idx_t'(1);
            end else begin
              c_q <= c_q + idx_t'(1);
            end
            state_q <= S_LD_REQ;
          end
        end
        S_ST_RD:   state_q <= S_ST_DATA;
        S_ST_DATA: begin
          word_q  <= vec_q ? v_rdata[0] : a_rdata[0];
          state_q <= S_ST_REQ;
        end
        S_ST_REQ: if (wr_ready) state_q <= S_ST_WAIT;
        S_ST_WAIT: if (wr_resp) begin
          if (cnt_q == last_cnt) begin
            if (vec_q) begin
              done    <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              vec_q   <= 1'b1;
              cnt_q   <= '0;
              base_q  <= out2_addr;
              state_q <= S_ST_RD;
            end
          end else begin
            cnt_q   <= cnt_q + addr_t'(1);
            state_q <= S_ST_RD;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
