// eig_pkg: types and constants shared by the eigen-solver kernels.
//
// All matrix data is IEEE-754 single precision (binary32), as in the
// kernels this design reproduces.  The float helpers below only touch the
// sign bit or compare magnitudes; real arithmetic lives in the fp32_*
// modules.  Subnormal numbers are flushed to zero throughout the design
// (a choice of this design), so a value is zero exactly when its exponent
// field is zero.
//
// The control register map and status bits follow the HLS control
// interface of the original kernels (AP_CTRL, GIE, IER, ISR and the
// argument registers at 0x10..0x28).
package eig_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3f80_0000;
  localparam fp32_t FP_TWO  = 32'h4000_0000;

  // Row/column index and on-chip word address widths.  IDX_W covers
  // matrices up to 1023 x 1023, ADDR_W their dim*dim words.
  localparam int IDX_W  = 10;
  localparam int ADDR_W = 20;
  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // One port of an on-chip matrix RAM (synchronous read, data one cycle
  // after the request).
  typedef struct packed {
    logic  en;
    logic  we;
    addr_t addr;
    fp32_t wdata;
  } ram_req_t;

  localparam ram_req_t RAM_IDLE = '{en: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  // Control register byte offsets.
  localparam logic [5:0] REG_AP_CTRL = 6'h00;
  localparam logic [5:0] REG_GIE     = 6'h04;
  localparam logic [5:0] REG_IER     = 6'h08;
  localparam logic [5:0] REG_ISR     = 6'h0c;
  localparam logic [5:0] REG_IN      = 6'h10;
  localparam logic [5:0] REG_OUT1    = 6'h18;
  localparam logic [5:0] REG_OUT2    = 6'h20;
  localparam logic [5:0] REG_DIM     = 6'h28;

  // AP_CTRL bits.
  localparam int AP_START = 0;
  localparam int AP_DONE  = 1;
  localparam int AP_IDLE  = 2;
  localparam int AP_READY = 3;
  localparam int AP_RESET = 7;

  // AXI4 memory-mapped master channels ("m_axi"), 32-bit address and
  // data.  The kernels issue single-beat INCR transfers.
  typedef struct packed {
    logic        awvalid;
    logic [31:0] awaddr;
    logic [7:0]  awlen;
    logic [2:0]  awsize;
    logic [1:0]  awburst;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wlast;
    logic        bready;
    logic        arvalid;
    logic [31:0] araddr;
    logic [7:0]  arlen;
    logic [2:0]  arsize;
    logic [1:0]  arburst;
    logic        rready;
  } axi_m2s_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rlast;
  } axi_s2m_t;

  // AXI4-Lite control channels ("s_axilite"), 6-bit register offset.
  typedef struct packed {
    logic        awvalid;
    logic [5:0]  awaddr;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        bready;
    logic        arvalid;
    logic [5:0]  araddr;
    logic        rready;
  } axil_m2s_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
  } axil_s2m_t;

  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_abs(fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  function automatic logic fp_is_zero(fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  // |a| > |b| for finite operands.
  function automatic logic fp_mag_gt(fp32_t a, fp32_t b);
    return a[30:0] > b[30:0];
  endfunction

  // Magnitude of a with the sign of b.
  function automatic fp32_t fp_copysign(fp32_t a, fp32_t b);
    return {b[31], a[30:0]};
  endfunction

  // Word address of element (r, c) of a row-major dim x dim matrix.
  function automatic addr_t mat_addr(idx_t r, idx_t c, idx_t dim);
    return addr_t'(r) * addr_t'(dim) + addr_t'(c);
  endfunction

endpackage
