// tb_fp_pkg: conversions between real (binary64) and binary32 bit
// patterns for the testbenches, written out bit by bit so that they do not
// depend on simulator support for shortreal.  real -> binary32 rounds to
// nearest, ties to even, and flushes subnormal results to zero like the
// design; binary32 -> real is exact.
package tb_fp_pkg;

  function automatic logic [31:0] r2f(real x);
    logic [63:0] d;
    logic [24:0] m;
    logic        rnd;
    int          e;
    d = $realtobits(x);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    if (d[62:52] == 11'h7ff) return {d[63], 8'hff, (d[51:0] != 0) ? 23'h400000 : 23'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    rnd = d[28] & ((d[27:0] != 0) | d[29]);
    m   = {2'b01, d[51:29]} + {24'd0, rnd};
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic real f2r(logic [31:0] f);
    int e;
    if (f[30:23] == 8'd0) return 0.0;
    e = int'(f[30:23]) - 127 + 1023;
    return $bitstoreal({f[31], e[10:0], f[22:0], 29'd0});
  endfunction

  // Sum, difference and product of two binary32 values, each rounded once:
  // the exact result fits in a real for products, and for sums is rounded
  // twice only in rare tie cases, which callers allow for with fp_close.
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // True when a and b are within ulps units in the last place (zeros of
  // either sign count as equal).
  function automatic bit fp_close(logic [31:0] a, logic [31:0] b, int ulps);
    longint ia, ib;
    ia = a[31] ? -longint'(a[30:0]) : longint'(a[30:0]);
    ib = b[31] ? -longint'(b[30:0]) : longint'(b[30:0]);
    return (ia - ib <= ulps) && (ib - ia <= ulps);
  endfunction

endpackage
