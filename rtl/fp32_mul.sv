// fp32_mul: single-precision floating-point multiplier (y = a * b),
// combinational.
//
// The 24-bit significands are multiplied into a 48-bit product, which is
// normalised by at most one place and rounded to nearest, ties to even,
// with the low product bits folded into a sticky bit.  Subnormal inputs
// read as zero and subnormal results flush to signed zero (this design's
// simplification).  Infinity times zero gives the quiet NaN.  No clock, no
// latency.
module fp32_mul
  import eig_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic        s;
    logic [47:0] p;
    logic [26:0] m;
    logic [24:0] mant;
    logic        rnd;
    int          e;

    s    = a[31] ^ b[31];
    y    = {s, 31'd0};
    p    = '0;
    m    = '0;
    mant = '0;
    rnd  = 1'b0;
    e    = 0;
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) begin
      if (a[30:23] == 8'd0 || b[30:23] == 8'd0) y = 32'h7fc0_0000;
      else                                     y = {s, 8'hff, 23'd0};
    end else if (a[30:23] != 8'd0 && b[30:23] != 8'd0) begin
      p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
      e = int'(a[30:23]) + int'(b[30:23]) - 127;
      if (p[47]) begin
        m = {p[47:22], |p[21:0]};
        e = e + 1;
      end else begin
        m = {p[46:21], |p[20:0]};
      end
      rnd  = m[2] & (m[1] | m[0] | m[3]);
      mant = {1'b0, m[26:3]} + {24'd0, rnd};
      if (mant[24]) begin
        mant = mant >> 1;
        e    = e + 1;
      end
      if (e <= 0)        y = {s, 31'd0};
      else if (e >= 255) y = {s, 8'hff, 23'd0};
      else               y = {s, e[7:0], mant[22:0]};
    end
  end

endmodule
