// tb_axil_ctrl: checks the AXI4-Lite control slave through its bus, with
// the testbench acting as host and as kernel.  It checks: the argument
// registers read back what was written, also with partial byte strobes;
// writing AP_CTRL bit 0 raises ap_start until the kernel's ready pulse;
// ap_done and ap_ready read as 1 once and clear on the AP_CTRL read; ap_idle
// is reported live; ISR bits set only when enabled in IER, raise irq only
// with GIE, and clear when 1 is written; AP_CTRL bit 7 drives ap_reset.
// The B and R responses must arrive in the cycle after the request is
// accepted.
module tb_axil_ctrl;
  import eig_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_m2s_t   s_in;
  axil_s2m_t   s_out;
  logic        ap_start, ap_reset, ap_done_pulse = 1'b0, ap_ready_pulse = 1'b0, ap_idle = 1'b1, irq;
  logic [31:0] in_addr, out1_addr, out2_addr, dim;
  int checks = 0, failures = 0;

  axil_ctrl dut (.clk, .rst_n, .s_in, .s_out, .ap_start, .ap_reset, .ap_done_pulse,
                 .ap_ready_pulse, .ap_idle, .in_addr, .out1_addr, .out2_addr, .dim, .irq);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(logic [5:0] a, logic [31:0] d, logic [3:0] be = 4'hf);
    int lat;
    @(negedge clk);
    s_in.awvalid = 1'b1; s_in.awaddr = a; s_in.wvalid = 1'b1; s_in.wdata = d; s_in.wstrb = be;
    s_in.bready = 1'b1;
    while (!(s_out.awready && s_out.wready)) @(negedge clk);
    @(negedge clk);
    s_in.awvalid = 1'b0; s_in.wvalid = 1'b0;
    check(s_out.bvalid && s_out.bresp == 2'b00, "B response not in the cycle after the write");
    @(negedge clk);
    s_in.bready = 1'b0;
  endtask

  task automatic rd(logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    s_in.arvalid = 1'b1; s_in.araddr = a; s_in.rready = 1'b1;
    while (!s_out.arready) @(negedge clk);
    @(negedge clk);
    s_in.arvalid = 1'b0;
    check(s_out.rvalid, "R response not in the cycle after the read");
    d = s_out.rdata;
    @(negedge clk);
    s_in.rready = 1'b0;
  endtask

  task automatic pulse(ref logic p);
    @(negedge clk);
    p = 1'b1;
    @(negedge clk);
    p = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    s_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // arguments
    wr(REG_IN, 32'h1000_0040);
    wr(REG_OUT1, 32'h2000_0000);
    wr(REG_OUT2, 32'h3000_0100);
    wr(REG_DIM, 32'd10);
    rd(REG_IN, d);   check(d == 32'h1000_0040 && in_addr == d, "in_matrix register");
    rd(REG_OUT1, d); check(d == 32'h2000_0000 && out1_addr == d, "out_matrix1 register");
    rd(REG_OUT2, d); check(d == 32'h3000_0100 && out2_addr == d, "out_matrix2 register");
    rd(REG_DIM, d);  check(d == 32'd10 && dim == d, "dim register");
    wr(REG_DIM, 32'hffff_ff01, 4'b0001);
    rd(REG_DIM, d);  check(d == 32'd1, $sformatf("byte strobe write gave %h", d));
    // start / ready / done / idle
    rd(REG_AP_CTRL, d); check(d[AP_IDLE] && !d[AP_START] && !d[AP_DONE], "idle status after reset");
    check(!ap_start, "ap_start low after reset");
    wr(REG_AP_CTRL, 32'h1);
    check(ap_start, "ap_start not raised");
    ap_idle = 1'b0;
    rd(REG_AP_CTRL, d); check(d[AP_START] && !d[AP_IDLE], "start bit / idle while running");
    pulse(ap_ready_pulse);
    check(!ap_start, "ap_start not cleared by ready");
    pulse(ap_done_pulse);
    ap_idle = 1'b1;
    check(!irq, "irq without GIE/IER");
    rd(REG_AP_CTRL, d); check(d[AP_DONE] && d[AP_READY] && d[AP_IDLE], "done/ready/idle after the run");
    rd(REG_AP_CTRL, d); check(!d[AP_DONE] && !d[AP_READY], "done/ready not cleared on read");
    rd(REG_ISR, d);     check(d == 0, "ISR set with IER = 0");
    // interrupts
    wr(REG_IER, 32'h1);
    wr(REG_AP_CTRL, 32'h1);
    pulse(ap_ready_pulse);
    pulse(ap_done_pulse);
    rd(REG_ISR, d);     check(d == 32'h1, $sformatf("ISR = %h, expected done only", d));
    check(!irq, "irq with GIE = 0");
    wr(REG_GIE, 32'h1);
    check(irq, "irq not raised");
    wr(REG_ISR, 32'h1);
    check(!irq, "irq not cleared by ISR write");
    wr(REG_IER, 32'h3);
    pulse(ap_ready_pulse);
    check(irq, "ready interrupt");
    rd(REG_ISR, d);     check(d == 32'h2, "ISR ready bit");
    wr(REG_ISR, 32'h2);
    check(!irq, "ready interrupt not cleared");
    // soft reset
    wr(REG_AP_CTRL, 32'h80);
    check(ap_reset, "ap_reset not raised");
    wr(REG_AP_CTRL, 32'h00);
    check(!ap_reset, "ap_reset not released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
