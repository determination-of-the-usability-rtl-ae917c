// eig_top: the accelerator overlay - a QR-algorithm kernel and a Jacobi
// kernel side by side, each solving the symmetric eigenvalue problem for
// one matrix at a time.
//
// Each kernel is a complete accelerator with its own AXI4-Lite control
// port, its own pair of AXI4 memory masters (gmem for the input matrix,
// gmem1 for the eigenvalue and eigenvector results) and its own interrupt.
// In a system the control ports hang off the processor's general-purpose
// port through an AXI interconnect and the memory masters reach the
// shared DRAM through another interconnect; those interconnects and the
// processor are not part of this RTL, so all ports are brought out.  The
// two kernels share only the clock and reset and can run at the same
// time on different matrices.
//
// MAX_DIM bounds the matrix size each kernel holds on chip (two
// MAX_DIM^2-word RAMs per kernel); the run-time size is the dim register.
module eig_top
  import eig_pkg::*;
#(
  parameter int MAX_DIM  = 500,
  parameter int MAX_ITER = 1_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // QR kernel
  input  axil_m2s_t   qr_ctrl_in,
  output axil_s2m_t   qr_ctrl_out,
  output axi_m2s_t    qr_gmem_m,
  input  axi_s2m_t    qr_gmem_s,
  output axi_m2s_t    qr_gmem1_m,
  input  axi_s2m_t    qr_gmem1_s,
  output logic        qr_irq,
  output logic [31:0] qr_iterations,
  // Jacobi kernel
  input  axil_m2s_t   jcb_ctrl_in,
  output axil_s2m_t   jcb_ctrl_out,
  output axi_m2s_t    jcb_gmem_m,
  input  axi_s2m_t    jcb_gmem_s,
  output axi_m2s_t    jcb_gmem1_m,
  input  axi_s2m_t    jcb_gmem1_s,
  output logic        jcb_irq,
  output logic [31:0] jcb_iterations
);

  qr_kernel #(.MAX_DIM(MAX_DIM), .MAX_ITER(MAX_ITER)) u_qr (
    .clk, .rst_n,
    .ctrl_in(qr_ctrl_in), .ctrl_out(qr_ctrl_out),
    .gmem_m(qr_gmem_m), .gmem_s(qr_gmem_s), .gmem1_m(qr_gmem1_m), .gmem1_s(qr_gmem1_s),
    .irq(qr_irq), .iterations(qr_iterations)
  );

  jcb_kernel #(.MAX_DIM(MAX_DIM), .MAX_ITER(MAX_ITER)) u_jcb (
    .clk, .rst_n,
    .ctrl_in(jcb_ctrl_in), .ctrl_out(jcb_ctrl_out),
    .gmem_m(jcb_gmem_m), .gmem_s(jcb_gmem_s), .gmem1_m(jcb_gmem1_m), .gmem1_s(jcb_gmem1_s),
    .irq(jcb_irq), .iterations(jcb_iterations)
  );

endmodule
