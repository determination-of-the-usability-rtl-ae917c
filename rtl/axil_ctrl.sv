// axil_ctrl: AXI4-Lite control slave of a kernel ("s_axi_control").
//
// It holds the block-level handshake and the kernel arguments at the
// offsets the original kernels' HLS interface uses:
//   0x00 AP_CTRL  bit0 ap_start (R/W, cleared when the kernel takes it),
//                 bit1 ap_done (R, cleared by reading AP_CTRL),
//                 bit2 ap_idle (R), bit3 ap_ready (R, cleared by reading),
//                 bit7 ap_reset (R/W, holds the kernel in reset while 1)
//   0x04 GIE      bit0 global interrupt enable
//   0x08 IER      bit0 done, bit1 ready interrupt enable
//   0x0c ISR      bit0 done, bit1 ready interrupt status (write 1 to clear)
//   0x10 in_matrix byte address, 0x18 out_matrix1 (eigenvalues) byte
//   address, 0x20 out_matrix2 (eigenvectors) byte address, 0x28 dim.
// irq = GIE & |(ISR).  The register offsets and the AP_CTRL bit positions
// follow the original; the ap_ready clear-on-read, the level behaviour of
// ap_reset and the write-1-to-clear ISR are this design's choices.
//
// Bus timing: a write is accepted when AW and W are both valid (awready
// and wready together), answered by B the cycle after; a read is answered
// by R the cycle after AR.  One transaction of each kind at a time.
module axil_ctrl
  import eig_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_m2s_t   s_in,
  output axil_s2m_t   s_out,
  output logic        ap_start,
  output logic        ap_reset,
  input  logic        ap_done_pulse,
  input  logic        ap_ready_pulse,
  input  logic        ap_idle,
  output logic [31:0] in_addr,
  output logic [31:0] out1_addr,
  output logic [31:0] out2_addr,
  output logic [31:0] dim,
  output logic        irq
);

  logic        start_q, done_q, ready_q, reset_q, gie_q;
  logic [1:0]  ier_q, isr_q;
  logic        bvalid_q, rvalid_q;
  logic [31:0] rdata_q;
  logic        wr_fire, rd_fire;

  assign wr_fire = s_in.awvalid && s_in.wvalid && !bvalid_q;
  assign rd_fire = s_in.arvalid && !rvalid_q;

  always_comb begin
    s_out         = '0;
    s_out.awready = wr_fire;
    s_out.wready  = wr_fire;
    s_out.bvalid  = bvalid_q;
    s_out.arready = !rvalid_q;
    s_out.rvalid  = rvalid_q;
    s_out.rdata   = rdata_q;
  end

  assign ap_start = start_q;
  assign ap_reset = reset_q;
  assign irq      = gie_q && (isr_q != 2'b00);

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] wd, logic [3:0] be);
    for (int b = 0; b < 4; b++)
      if (be[b]) old[8*b +: 8] = wd[8*b +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {start_q, done_q, ready_q, reset_q, gie_q} <= '0;
      ier_q     <= '0;
      isr_q     <= '0;
      bvalid_q  <= 1'b0;
      rvalid_q  <= 1'b0;
      rdata_q   <= '0;
      in_addr   <= '0;
      out1_addr <= '0;
      out2_addr <= '0;
      dim       <= '0;
    end else begin
      // write channel
      if (bvalid_q && s_in.bready) bvalid_q <= 1'b0;
      if (wr_fire) begin
        bvalid_q <= 1'b1;
        unique case (s_in.awaddr)
          REG_AP_CTRL: if (s_in.wstrb[0]) begin
            if (s_in.wdata[AP_START]) start_q <= 1'b1;
            reset_q <= s_in.wdata[AP_RESET];
          end
          REG_GIE:  if (s_in.wstrb[0]) gie_q <= s_in.wdata[0];
          REG_IER:  if (s_in.wstrb[0]) ier_q <= s_in.wdata[1:0];
          REG_ISR:  if (s_in.wstrb[0]) isr_q <= isr_q & ~s_in.wdata[1:0];
          REG_IN:   in_addr   <= merge(in_addr,   s_in.wdata, s_in.wstrb);
          REG_OUT1: out1_addr <= merge(out1_addr, s_in.wdata, s_in.wstrb);
          REG_OUT2: out2_addr <= merge(out2_addr, s_in.wdata, s_in.wstrb);
          REG_DIM:  dim       <= merge(dim,       s_in.wdata, s_in.wstrb);
          default: ;
        endcase
      end
      // read channel
      if (rvalid_q && s_in.rready) rvalid_q <= 1'b0;
      if (rd_fire) begin
        rvalid_q <= 1'b1;
        unique case (s_in.araddr)
          REG_AP_CTRL: begin
            rdata_q <= {24'd0, reset_q, 3'd0, ready_q, ap_idle, done_q, start_q};
            done_q  <= 1'b0;
            ready_q <= 1'b0;
          end
          REG_GIE:  rdata_q <= {31'd0, gie_q};
          REG_IER:  rdata_q <= {30'd0, ier_q};
          REG_ISR:  rdata_q <= {30'd0, isr_q};
          REG_IN:   rdata_q <= in_addr;
          REG_OUT1: rdata_q <= out1_addr;
          REG_OUT2: rdata_q <= out2_addr;
          REG_DIM:  rdata_q <= dim;
          default:  rdata_q <= '0;
        endcase
      end
      // kernel events (after the read clear, so an event is never lost)
      if (ap_ready_pulse) begin
        start_q <= 1'b0;
        ready_q <= 1'b1;
        if (ier_q[1]) isr_q[1] <= 1'b1;
      end
      if (ap_done_pulse) begin
        done_q <= 1'b1;
        if (ier_q[0]) isr_q[0] <= 1'b1;
      end
    end
  end

endmodule
