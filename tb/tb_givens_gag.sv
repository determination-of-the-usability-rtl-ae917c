// tb_givens_gag: checks the two-sided rotation A <- G^T A G on a 7 x 7 matrix in
// on a 7 x 7 matrix in a small mat_ram.  For random pairs (i, j), random
// rotations and random zero_ij, the whole matrix is read back and compared
// with the same computation in the testbench: rows i, j rotated, then
// columns i, j of the result, then (zero_ij) a(i,j) = a(j,i) = 0; every
// other element untouched; one unit in the last place allowed.  The
// operation must take 4*dim + 6 cycles, one more with zero_ij.
module tb_givens_gag;
  import eig_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 7;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, zero_ij = 1'b0;
  always #5 clk = ~clk;

  idx_t  dim = idx_t'(N), i, j;
  fp32_t c, s;
  ram_req_t [1:0] req;
  fp32_t    [1:0] rdata;
  logic busy, done;
  fp32_t m [N][N], e [N][N];
  int checks = 0, failures = 0;

  mat_ram #(.DEPTH(64)) ram (.clk, .req, .rdata);
  givens_gag dut (.clk, .rst_n, .start, .zero_ij, .dim, .i, .j, .c, .s, .req, .rdata, .busy, .done);

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
      zero_ij = $urandom % 2;
      e = m;
      for (int k = 0; k < N; k++) begin          // rows i, j
        e[i][k] = fsub(fmul(c, m[i][k]), fmul(s, m[j][k]));
        e[j][k] = fadd(fmul(s, m[i][k]), fmul(c, m[j][k]));
      end
      for (int k = 0; k < N; k++) begin          // then columns i, j
        fp32_t x, y;
        x = e[k][i];
        y = e[k][j];
        e[k][i] = fsub(fmul(c, x), fmul(s, y));
        e[k][j] = fadd(fmul(s, x), fmul(c, y));
      end
      if (zero_ij) begin
        e[i][j] = FP_ZERO;
        e[j][i] = FP_ZERO;
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
      if (lat != 4 * N + 6 + int'(zero_ij)) begin
        failures++;
        $display("FAIL: pass took %0d cycles, expected %0d", lat, 4 * N + 6 + int'(zero_ij));
      end
      for (int r = 0; r < N; r++)
        for (int q = 0; q < N; q++) begin
          checks++;
          if (!fp_close(ram.mem[r*N + q], e[r][q], 1)) begin
            failures++;
            if (failures < 10) $display("FAIL: (%0d,%0d) = %h, expected %h (i=%0d j=%0d zero=%0d)",
                                        r, q, ram.mem[r*N + q], e[r][q], i, j, zero_ij);
          end
          m[r][q] = ram.mem[r*N + q];
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
