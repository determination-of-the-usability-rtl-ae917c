// tb_mat_ram: checks the dual-port matrix RAM against an array kept by the
// testbench.  Each cycle both ports get a random request (idle, read or
// write, at random addresses of a 64-word instance, never writing the same
// address on both ports); read data is checked one cycle later and must
// be the contents before that cycle's writes (read-before-write).
module tb_mat_ram;
  import eig_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ram_req_t [1:0] req;
  fp32_t    [1:0] rdata;
  fp32_t          ref_mem [DEPTH];
  fp32_t          exp_q [2];
  bit             chk_q [2];
  int checks = 0, failures = 0;

  mat_ram #(.DEPTH(DEPTH)) dut (.clk, .req, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '{default: RAM_IDLE};
    // fill the memory through port 0 so that every word is known
    for (int a = 0; a < DEPTH; a++) begin
      req[0] = '{en: 1'b1, we: 1'b1, addr: addr_t'(a), wdata: $urandom};
      ref_mem[a] = req[0].wdata;
      @(posedge clk); #1;
    end
    chk_q = '{0, 0};
    for (int n = 0; n < 20000; n++) begin
      for (int p = 0; p < 2; p++) begin
        req[p].en    = ($urandom % 4) != 0;
        req[p].we    = $urandom % 2;
        req[p].addr  = addr_t'($urandom % DEPTH);
        req[p].wdata = $urandom;
      end
      if (req[1].we && req[0].we && req[1].addr == req[0].addr) req[1].we = 1'b0;
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) begin
        if (req[p].en) begin
          checks++;
          if (rdata[p] != ref_mem[req[p].addr]) begin
            failures++;
            if (failures < 10) $display("FAIL: port %0d addr %0d read %h expected %h", p, req[p].addr,
                                        rdata[p], ref_mem[req[p].addr]);
          end
        end
      end
      for (int p = 0; p < 2; p++)
        if (req[p].en && req[p].we) ref_mem[req[p].addr] = req[p].wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
