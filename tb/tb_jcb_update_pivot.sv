// tb_jcb_update_pivot: checks the row scan that finds the pivot column of
// row k: the column j > k with the largest |a(k,j)|, the first one on a
// tie.  Random 9 x 9 matrices in a small mat_ram, with values drawn from
// a short list so that ties and sign differences occur; every row
// 0..dim-2 is scanned and the result compared with the testbench's own
// scan.  The scan must finish within dim - k + 3 cycles.
module tb_jcb_update_pivot;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  idx_t dim = idx_t'(N), k, col;
  ram_req_t [1:0] req;
  fp32_t    [1:0] rdata;
  logic busy, done;
  int checks = 0, failures = 0, ties = 0;

  mat_ram #(.DEPTH(128)) ram (.clk, .req, .rdata);
  jcb_update_pivot dut (.clk, .rst_n, .start, .dim, .k, .req, .rdata, .busy, .done, .col);

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
    for (int t = 0; t < 100; t++) begin
      for (int r = 0; r < N; r++)
        for (int q = 0; q < N; q++)
          ram.mem[r*N + q] = r2f(real'(int'($urandom % 9) - 4) * 0.5);
      for (int r = 0; r < N - 1; r++) begin
        int best, lat;
        real bv;
        best = r + 1;
        bv   = f2r(ram.mem[r*N + r + 1]);
        if (bv < 0) bv = -bv;
        for (int q = r + 2; q < N; q++) begin
          real v;
          v = f2r(ram.mem[r*N + q]);
          if (v < 0) v = -v;
          if (v == bv) ties++;
          if (v > bv) begin
            bv   = v;
            best = q;
          end
        end
        k = idx_t'(r);
        @(negedge clk);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        lat = 1;
        while (!done) begin
          @(negedge clk);
          lat++;
        end
        checks++;
        if (col != idx_t'(best)) begin
          failures++;
          if (failures < 10) $display("FAIL: row %0d pivot column %0d, expected %0d", r, col, best);
        end
        checks++;
        if (lat > N - r + 3) begin
          failures++;
          if (failures < 10) $display("FAIL: row %0d scan took %0d cycles", r, lat);
        end
      end
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL: no ties were exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
