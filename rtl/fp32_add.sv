// fp32_add: single-precision floating-point adder (y = a + b), combinational.
//
// The operands are ordered by magnitude, the smaller one is aligned with a
// guard, a round and a sticky bit, the significands are added or subtracted,
// the result is renormalised and rounded to nearest, ties to even, as
// IEEE-754 prescribes.  Subnormal inputs are read as zero and results that
// would be subnormal are flushed to zero (a simplification of this design;
// the matrices the kernels solve stay far from that range).  An infinite or
// NaN input is passed through, inf - inf gives the quiet NaN.  An exact
// cancellation gives +0.  Subtraction is done by the caller flipping the
// sign bit of b.  No clock, no latency.
module fp32_add
  import eig_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic        s_l, s_s;
    logic [7:0]  e_l, e_s, d;
    logic [23:0] m_l, m_s;
    logic [26:0] x_l, x_s, mask;
    logic [27:0] sum;
    logic [26:0] m;
    logic [24:0] mant;
    logic        rnd;
    int          e, lz;

    y    = FP_ZERO;
    s_l  = 1'b0;
    s_s  = 1'b0;
    e_l  = '0;
    e_s  = '0;
    d    = '0;
    m_l  = '0;
    m_s  = '0;
    x_l  = '0;
    x_s  = '0;
    mask = '0;
    sum  = '0;
    m    = '0;
    mant = '0;
    rnd  = 1'b0;
    e    = 0;
    lz   = 0;
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) begin
      if (a[30:23] == 8'hff && b[30:23] == 8'hff && a[31] != b[31])
        y = 32'h7fc0_0000;
      else if (a[30:23] == 8'hff)
        y = a;
      else
        y = b;
    end else begin
      if (a[30:0] >= b[30:0]) begin
        s_l = a[31]; e_l = a[30:23]; m_l = (a[30:23] == 0) ? 24'd0 : {1'b1, a[22:0]};
        s_s = b[31]; e_s = b[30:23]; m_s = (b[30:23] == 0) ? 24'd0 : {1'b1, b[22:0]};
      end else begin
        s_l = b[31]; e_l = b[30:23]; m_l = (b[30:23] == 0) ? 24'd0 : {1'b1, b[22:0]};
        s_s = a[31]; e_s = a[30:23]; m_s = (a[30:23] == 0) ? 24'd0 : {1'b1, a[22:0]};
      end
      if (e_s == 0) e_s = e_l;          // a zero operand needs no alignment
      d   = e_l - e_s;
      x_l = {m_l, 3'b000};
      if (d >= 8'd27) begin
        x_s = (m_s != 0) ? 27'd1 : 27'd0;
      end else begin
        mask = (27'd1 << d) - 27'd1;
        x_s  = ({m_s, 3'b000} >> d) | {26'd0, |({m_s, 3'b000} & mask)};
      end
      if (s_l == s_s) sum = {1'b0, x_l} + {1'b0, x_s};
      else            sum = {1'b0, x_l} - {1'b0, x_s};

      if (sum == 0) begin
        y = FP_ZERO;
      end else begin
        e = int'(e_l);
        if (sum[27]) begin
          m = {sum[27:2], sum[1] | sum[0]};
          e = e + 1;
        end else begin
          lz = 0;
          for (int i = 26; i >= 0; i--) begin
            if (sum[i]) break;
            lz++;
          end
          m = sum[26:0] << lz;
          e = e - lz;
        end
        rnd  = m[2] & (m[1] | m[0] | m[3]);
        mant = {1'b0, m[26:3]} + {24'd0, rnd};
        if (mant[24]) begin
          mant = mant >> 1;
          e    = e + 1;
        end
        if (e <= 0)        y = {s_l, 31'd0};
        else if (e >= 255) y = {s_l, 8'hff, 23'd0};
        else               y = {s_l, e[7:0], mant[22:0]};
      end
    end
  end

endmodule
