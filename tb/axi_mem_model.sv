// axi_mem_model: behavioural AXI4 slave memory for the testbenches - a
// stand-in for the board DRAM behind a kernel's memory bundle.
//
// WORDS 32-bit words from byte address 0.  Single-beat transfers only
// (len 0), which is all the kernels issue; a burst is flagged by an
// assertion.  With STALL = 1 every ready and response is delayed by a
// random 0..3 cycles, so the masters see back-pressure.  The testbench
// reads and writes mem[] directly to set up inputs and check results.
module axi_mem_model
  import eig_pkg::*;
#(
  parameter int WORDS = 4096,
  parameter bit STALL = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_m2s_t m,
  output axi_s2m_t s
);

  logic [31:0] mem [WORDS];
  int unsigned ar_wait, aw_wait, r_wait, b_wait;
  logic        r_pend, b_pend;
  logic [31:0] r_data;
  int unsigned n_stall;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  function automatic int unsigned rnd_wait();
    return STALL ? ($urandom % 4) : 0;
  endfunction

  always_comb begin
    s = '0;
    s.arready = rst_n && !r_pend && (ar_wait == 0);
    s.rvalid  = r_pend && (r_wait == 0);
    s.rdata   = r_data;
    s.rlast   = 1'b1;
    s.awready = rst_n && !b_pend && (aw_wait == 0) && m.wvalid;
    s.wready  = rst_n && !b_pend && (aw_wait == 0) && m.awvalid;
    s.bvalid  = b_pend && (b_wait == 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_pend  <= 1'b0;
      b_pend  <= 1'b0;
      r_data  <= '0;
      ar_wait <= 0;
      aw_wait <= 0;
      r_wait  <= 0;
      b_wait  <= 0;
      n_stall <= 0;
    end else begin
      if (m.arvalid && !s.arready && !r_pend) begin
        ar_wait <= (ar_wait > 0) ? ar_wait - 1 : 0;
        n_stall <= n_stall + 1;
      end
      if (m.arvalid && s.arready) begin
        r_data  <= mem[m.araddr[31:2] % WORDS];
        r_pend  <= 1'b1;
        r_wait  <= rnd_wait();
        ar_wait <= rnd_wait();
      end
      if (r_pend && r_wait > 0) r_wait <= r_wait - 1;
      if (s.rvalid && m.rready) r_pend <= 1'b0;

      if (m.awvalid && !s.awready && !b_pend) begin
        aw_wait <= (aw_wait > 0) ? aw_wait - 1 : 0;
        n_stall <= n_stall + 1;
      end
      if (m.awvalid && s.awready) begin
        mem[m.awaddr[31:2] % WORDS] <= m.wdata;
        b_pend  <= 1'b1;
        b_wait  <= rnd_wait();
        aw_wait <= rnd_wait();
      end
      if (b_pend && b_wait > 0) b_wait <= b_wait - 1;
      if (s.bvalid && m.bready) b_pend <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) m.arvalid |-> m.arlen == 8'd0);
  assert property (@(posedge clk) disable iff (!rst_n) m.awvalid |-> m.awlen == 8'd0);

endmodule
