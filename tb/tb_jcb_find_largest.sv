// tb_jcb_find_largest: checks the pivot search.  The testbench holds the
// pivot table (one column per row, answering pv_row with pv_col in the
// same cycle, as the kernel's table does) and a random 9 x 9 matrix in a
// small mat_ram with values from a short list, so ties and zero pivots
// occur.  The result must be the first row k in 0..dim-2 whose entry
// |a(k, pv(k))| is largest, with l = pv(k) and akl = a(k,l).  The search
// must take dim + 1 cycles.
module tb_jcb_find_largest;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  idx_t  dim = idx_t'(N), pv_row, pv_col, k, l;
  idx_t  pv [N];
  fp32_t akl;
  ram_req_t [1:0] req;
  fp32_t    [1:0] rdata;
  logic busy, done;
  int checks = 0, failures = 0;

  assign pv_col = pv[pv_row];

  mat_ram #(.DEPTH(128)) ram (.clk, .req, .rdata);
  jcb_find_largest dut (.clk, .rst_n, .start, .dim, .pv_row, .pv_col, .req, .rdata,
                        .busy, .done, .k, .l, .akl);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      int bk, lat;
      real bv;
      for (int r = 0; r < N; r++)
        for (int q = 0; q < N; q++)
          ram.mem[r*N + q] = (t % 50 == 0) ? FP_ZERO : r2f(real'(int'($urandom % 9) - 4) * 0.25);
      for (int r = 0; r < N; r++) pv[r] = idx_t'((r < N - 1) ? r + 1 + ($urandom % (N - 1 - r)) : 0);
      bk = 0;
      bv = -1.0;
      for (int r = 0; r < N - 1; r++) begin
        real v;
        v = f2r(ram.mem[r*N + pv[r]]);
        if (v < 0) v = -v;
        if (v > bv) begin
          bv = v;
          bk = r;
        end
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done) begin
        @(negedge clk);
        lat++;
      end
      checks += 4;
      if (k != idx_t'(bk) || l != pv[bk] || akl != ram.mem[bk*N + pv[bk]] || lat != N + 1) begin
        failures++;
        if (failures < 10) $display("FAIL: k=%0d l=%0d akl=%h in %0d cycles, expected k=%0d l=%0d akl=%h",
                                    k, l, akl, lat, bk, pv[bk], ram.mem[bk*N + pv[bk]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
