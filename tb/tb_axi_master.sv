// tb_axi_master: checks the single-beat AXI4 master against a memory model
// that stalls each channel for a random 0..3 cycles.  A random mix of
// writes and reads to a 256-word region is issued through the request
// port; every read must return the last value written to that word, every
// request must get exactly one response, and the bus must carry single
// beats (length 0, 4-byte size, all strobes).  The handshake rules
// (valid held until ready) are checked by the master's own assertions.
module tb_axi_master;
  import eig_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        req_valid = 1'b0, req_ready, req_we = 1'b0, resp_valid, resp_err;
  logic [31:0] req_addr = '0, req_wdata = '0, resp_rdata;
  axi_m2s_t    m;
  axi_s2m_t    s;
  logic [31:0] shadow [256];
  int checks = 0, failures = 0, n_rd = 0, n_wr = 0;

  axi_master dut (.clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
                  .resp_valid, .resp_rdata, .resp_err, .m, .s);
  axi_mem_model #(.WORDS(256)) mem (.clk, .rst_n, .m, .s);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (m.awvalid || m.arvalid) begin
      checks++;
      if ((m.awvalid && (m.awlen != 0 || m.awsize != 3'd2 || m.wstrb != 4'hf)) ||
          (m.arvalid && (m.arlen != 0 || m.arsize != 3'd2))) begin
        failures++;
        $display("FAIL: not a single 32-bit beat");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 256; w++) shadow[w] = '0;
    for (int t = 0; t < 3000; t++) begin
      int w;
      w = $urandom % 256;
      @(negedge clk);
      req_valid = 1'b1;
      req_we    = $urandom % 2;
      req_addr  = 32'(w) << 2;
      req_wdata = $urandom;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 1'b0;
      while (!resp_valid) @(negedge clk);
      checks++;
      if (resp_err) begin
        failures++;
        $display("FAIL: error response");
      end
      if (req_we) begin
        shadow[w] = req_wdata;
        n_wr++;
      end else begin
        n_rd++;
        checks++;
        if (resp_rdata != shadow[w]) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d read %h, expected %h", w, resp_rdata, shadow[w]);
        end
      end
      @(negedge clk);
      checks++;
      if (resp_valid) begin
        failures++;
        $display("FAIL: second response for one request");
      end
    end
    for (int w = 0; w < 256; w++) begin
      checks++;
      if (mem.mem[w] != shadow[w]) begin
        failures++;
        if (failures < 10) $display("FAIL: memory word %0d = %h, expected %h", w, mem.mem[w], shadow[w]);
      end
    end
    $display("reads %0d, writes %0d, stalled cycles %0d", n_rd, n_wr, mem.n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
