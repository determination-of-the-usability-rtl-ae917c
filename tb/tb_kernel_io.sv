// tb_kernel_io: checks the kernel's data mover with a 5 x 5 matrix and
// AXI memory models that stall at random.  LOAD must copy the row-major
// matrix at in_addr into the A RAM and write the identity into the V RAM.
// The testbench then puts new values into both RAMs, and STORE must write
// the diagonal of A to out_addr1 (n words) and V to out_addr2 (n*n words,
// row-major), without touching the words around either region.  Each
// load or store transfers one word per AXI transaction, so it must take
// at least 3 cycles per word.
module tb_kernel_io;
  import eig_pkg::*;

  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, store = 1'b0;
  always #5 clk = ~clk;

  idx_t dim = idx_t'(N);
  ram_req_t [1:0] a_req, v_req;
  fp32_t    [1:0] a_rdata, v_rdata;
  axi_m2s_t gmem_m, gmem1_m;
  axi_s2m_t gmem_s, gmem1_s;
  logic busy, done;
  int checks = 0, failures = 0;

  mat_ram #(.DEPTH(32)) ram_a (.clk, .req(a_req), .rdata(a_rdata));
  mat_ram #(.DEPTH(32)) ram_v (.clk, .req(v_req), .rdata(v_rdata));
  axi_mem_model #(.WORDS(128)) m_in  (.clk, .rst_n, .m(gmem_m),  .s(gmem_s));
  axi_mem_model #(.WORDS(128)) m_out (.clk, .rst_n, .m(gmem1_m), .s(gmem1_s));
  kernel_io dut (.clk, .rst_n, .start, .store, .dim, .in_addr(32'h40), .out1_addr(32'h20),
                 .out2_addr(32'h80), .a_req, .a_rdata, .v_req, .v_rdata, .gmem_m, .gmem_s,
                 .gmem1_m, .gmem1_s, .busy, .done);

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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(bit st, int words);
    int lat;
    store = st;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    check(lat >= 3 * words, $sformatf("%0d words moved in %0d cycles", words, lat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 128; w++) begin
      m_in.mem[w]  = $urandom;
      m_out.mem[w] = 32'hdead_beef;
    end
    // LOAD
    run(1'b0, N * N);
    for (int w = 0; w < N * N; w++) begin
      check(ram_a.mem[w] == m_in.mem[16 + w], $sformatf("A word %0d", w));
      check(ram_v.mem[w] == (((w / N) == (w % N)) ? FP_ONE : FP_ZERO), $sformatf("V word %0d", w));
    end
    // STORE of new contents
    for (int w = 0; w < N * N; w++) begin
      ram_a.mem[w] = $urandom;
      ram_v.mem[w] = $urandom;
    end
    run(1'b1, N + N * N);
    for (int w = 0; w < 128; w++) begin
      logic [31:0] e;
      if (w >= 8 && w < 8 + N)              e = ram_a.mem[(w - 8) * (N + 1)];
      else if (w >= 32 && w < 32 + N * N)   e = ram_v.mem[w - 32];
      else                                  e = 32'hdead_beef;
      check(m_out.mem[w] == e, $sformatf("output word %0d = %h, expected %h", w, m_out.mem[w], e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
