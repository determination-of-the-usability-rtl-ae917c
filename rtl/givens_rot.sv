// givens_rot: applies one plane rotation to a pair of numbers,
// combinational.
//
//   x' = c*x - s*y
//   y' = s*x + c*y
//
// This is the element operation of the Givens matrix G(i, j) with c on the
// diagonal, -s in row i and s in row j, applied to rows i and j of a
// matrix (G*A) or, with the same formula, to columns i and j of A*G^T.
// Four fp32 multipliers and two fp32 adders; every product is rounded
// before the sum, as a sequence of single-precision operations would be.
module givens_rot
  import eig_pkg::*;
(
  input  fp32_t c,
  input  fp32_t s,
  input  fp32_t x,
  input  fp32_t y,
  output fp32_t xo,
  output fp32_t yo
);

  fp32_t cx, sy, sx, cy;

  fp32_mul u_cx (.a(c), .b(x), .y(cx));
  fp32_mul u_sy (.a(s), .b(y), .y(sy));
  fp32_mul u_sx (.a(s), .b(x), .y(sx));
  fp32_mul u_cy (.a(c), .b(y), .y(cy));

  fp32_add u_x (.a(cx), .b(fp_neg(sy)), .y(xo));
  fp32_add u_y (.a(sx), .b(cy),         .y(yo));

endmodule
