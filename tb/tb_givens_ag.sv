// tb_givens_ag: checks the row/column rotation engine on a 7 x 7 matrix in
// a small mat_ram.  For random pairs (i, j), random rotations and both
// directions, the whole matrix is read back after the pass and compared
// with the rotation done in the testbench (rows or columns i and j
// rotated, every other element untouched, one unit in the last place
// allowed).  The pass must take 2*dim + 1 cycles from start to done.
module tb_givens_ag;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 7;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, by_row = 1'b0;
  always #5 clk = ~clk;

  idx_t  dim = idx_t'(N), i, j;
  fp32_t c, s;
  ram_req_t [1:0] req;
  fp32_t    [1:0] rdata;
  logic busy, done;
  fp32_t m [N][N], e [N][N];
  int checks = 0, failures = 0;

  mat_ram #(.DEPTH(64)) ram (.clk, .req, .rdata);
  givens_ag dut (.clk, .rst_n, .start, .by_row, .dim, .i, .j, .c, .s, .req, .rdata, .busy, .done);

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
    for (int r = 0; r < N; r++)
      for (int q = 0; q < N; q++) begin
        m[r][q] = r2f((real'($urandom % 20001) - 10000.0) / 100.0);
        ram.mem[r*N + q] = m[r][q];
      end
    for (int t = 0; t < 200; t++) begin
      real ang;
      int lat;
      ang = real'($urandom % 62832) / 10000.0;
      c = r2f($cos(ang));
      s = r2f($sin(ang));
      i = idx_t'($urandom % N);
      do j = idx_t'($urandom % N); while (j == i);
      by_row = $urandom % 2;
      e = m;
      for (int k = 0; k < N; k++) begin
        fp32_t x, y;
        x = by_row ? m[i][k] : m[k][i];
        y = by_row ? m[j][k] : m[k][j];
        if (by_row) begin
          e[i][k] = fsub(fmul(c, x), fmul(s, y));
          e[j][k] = fadd(fmul(s, x), fmul(c, y));
        end else begin
          e[k][i] = fsub(fmul(c, x), fmul(s, y));
          e[k][j] = fadd(fmul(s, x), fmul(c, y));
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
      checks++;
      if (lat != 2 * N + 1) begin
        failures++;
        $display("FAIL: pass took %0d cycles, expected %0d", lat, 2 * N + 1);
      end
      for (int r = 0; r < N; r++)
        for (int q = 0; q < N; q++) begin
          checks++;
          if (!fp_close(ram.mem[r*N + q], e[r][q], 1)) begin
            failures++;
            if (failures < 10) $display("FAIL: (%0d,%0d) = %h, expected %h (i=%0d j=%0d row=%0d)",
                                        r, q, ram.mem[r*N + q], e[r][q], i, j, by_row);
          end
          m[r][q] = ram.mem[r*N + q];
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
