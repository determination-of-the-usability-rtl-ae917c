// axi_master: single-beat AXI4 master for a kernel's memory port
// ("m_axi" bundle gmem / gmem1).
//
// The kernel side is a request/response pair: a request (req_valid with
// req_ready) carries a byte address, a write flag and write data; exactly
// one resp_valid pulse follows when the transfer has completed, carrying
// the read data for a read.  One transfer is outstanding at a time, each a
// single 32-bit beat (len 0, size 4 bytes, INCR).  A write drives the AW
// and W channels together and completes on the B response; a read drives
// AR and completes on R.  The response codes are returned in resp_err
// (any non-OKAY response) but not acted on.  The original kernels' memory
// ports burst; single beats are this design's simplification.
//
// Timing: a read takes 2 cycles plus the slave's latency; a write 3 plus
// the slave's latency.
module axi_master
  import eig_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        resp_valid,
  output logic [31:0] resp_rdata,
  output logic        resp_err,
  output axi_m2s_t    m,
  input  axi_s2m_t    s
);

  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_AW_W, S_B} state_t;

  state_t      state_q;
  logic        aw_done_q, w_done_q;
  logic [31:0] addr_q, wdata_q;

  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    m = '0;
    m.awaddr  = addr_q;
    m.awsize  = 3'd2;
    m.awburst = 2'b01;
    m.wdata   = wdata_q;
    m.wstrb   = 4'hf;
    m.wlast   = 1'b1;
    m.araddr  = addr_q;
    m.arsize  = 3'd2;
    m.arburst = 2'b01;
    m.arvalid = (state_q == S_AR);
    m.rready  = (state_q == S_R);
    m.awvalid = (state_q == S_AW_W) && !aw_done_q;
    m.wvalid  = (state_q == S_AW_W) && !w_done_q;
    m.bready  = (state_q == S_B);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      aw_done_q  <= 1'b0;
      w_done_q   <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      resp_err   <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          addr_q    <= req_addr;
          wdata_q   <= req_wdata;
          aw_done_q <= 1'b0;
          w_done_q  <= 1'b0;
          state_q   <= req_we ? S_AW_W : S_AR;
        end
        S_AR: if (s.arready) state_q <= S_R;
        S_R: if (s.rvalid) begin
          resp_rdata <= s.rdata;
          resp_err   <= (s.rresp != 2'b00);
          resp_valid <= 1'b1;
          state_q    <= S_IDLE;
        end
        S_AW_W: begin
          if (s.awready) aw_done_q <= 1'b1;
          if (s.wready)  w_done_q  <= 1'b1;
          if ((aw_done_q || s.awready) && (w_done_q || s.wready)) state_q <= S_B;
        end
        S_B: if (s.bvalid) begin
          resp_err   <= (s.bresp != 2'b00);
          resp_valid <= 1'b1;
          state_q    <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a valid stays up, with stable payload, until its handshake.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m.arvalid && !s.arready |=> m.arvalid && $stable(m.araddr));
  assert property (@(posedge clk) disable iff (!rst_n)
                   m.awvalid && !s.awready |=> m.awvalid && $stable(m.awaddr));
  assert property (@(posedge clk) disable iff (!rst_n)
                   m.wvalid && !s.wready |=> m.wvalid && $stable(m.wdata));

endmodule
