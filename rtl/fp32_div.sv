// fp32_div: single-precision floating-point divider (y = a / b), iterative.
//
// A pulse on start latches the operands.  The significand quotient is
// formed by restoring division, one bit per clock: 26 bits (hidden bit, 23
// fraction bits, guard and round) plus a sticky bit from the final
// remainder, then rounded to nearest, ties to even.  done pulses for one
// cycle when y is valid; y holds until the next start.  Latency: 28 cycles
// from start to done (1 for special operands: zero, infinity, NaN).
// Subnormals are treated as zero, as in the other fp32 units; x/0 gives a
// signed infinity and 0/0 the quiet NaN.
module fp32_div
  import eig_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  logic        s_q;
  int          e_q;
  logic [25:0] rem_q;
  logic [23:0] den_q;
  logic [25:0] quo_q;
  logic [4:0]  cnt_q;
  logic        run_q, fin_q;

  assign busy = run_q | start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      fin_q <= 1'b0;
      done  <= 1'b0;
      y     <= FP_ZERO;
      s_q   <= 1'b0;
      e_q   <= 0;
      rem_q <= '0;
      den_q <= '0;
      quo_q <= '0;
      cnt_q <= '0;
    end else begin
      done  <= 1'b0;
      fin_q <= 1'b0;
      if (start) begin
        s_q <= a[31] ^ b[31];
        if (a[30:23] == 8'hff || b[30:23] == 8'hff || a[30:23] == 0 || b[30:23] == 0) begin
          // special operands resolve immediately
          if ((a[30:23] == 0 && b[30:23] == 0) || (a[30:23] == 8'hff && b[30:23] == 8'hff) ||
              (a[30:23] == 8'hff && a[22:0] != 0) || (b[30:23] == 8'hff && b[22:0] != 0))
            y <= 32'h7fc0_0000;
          else if (a[30:23] == 8'hff || b[30:23] == 0)
            y <= {a[31] ^ b[31], 8'hff, 23'd0};
          else
            y <= {a[31] ^ b[31], 31'd0};
          done <= 1'b1;
        end else begin
          den_q <= {1'b1, b[22:0]};
          if (a[22:0] < b[22:0]) begin
            rem_q <= 26'({1'b1, a[22:0], 1'b0});
            e_q   <= int'(a[30:23]) - int'(b[30:23]) + 126;
          end else begin
            rem_q <= 26'({1'b1, a[22:0]});
            e_q   <= int'(a[30:23]) - int'(b[30:23]) + 127;
          end
          quo_q <= '0;
          cnt_q <= 5'd26;
          run_q <= 1'b1;
        end
      end else if (run_q) begin
        if (rem_q >= {2'b00, den_q}) begin
          quo_q <= {quo_q[24:0], 1'b1};
          rem_q <= (rem_q - {2'b00, den_q}) << 1;
        end else begin
          quo_q <= {quo_q[24:0], 1'b0};
          rem_q <= rem_q << 1;
        end
        cnt_q <= cnt_q - 5'd1;
        if (cnt_q == 5'd1) begin
          run_q <= 1'b0;
          fin_q <= 1'b1;
        end
      end else if (fin_q) begin
        y    <= pack(s_q, e_q, {quo_q, rem_q != 0});
        done <= 1'b1;
      end
    end
  end

  // Round a normalised 27-bit significand {hidden, 23 fraction, guard,
  // round, sticky} with exponent e and pack it.
  function automatic fp32_t pack(logic s, int e, logic [26:0] m);
    logic [24:0] mant;
    logic        rnd;
    int          ex;
    ex   = e;
    rnd  = m[2] & (m[1] | m[0] | m[3]);
    mant = {1'b0, m[26:3]} + {24'd0, rnd};
    if (mant[24]) begin
      mant = mant >> 1;
      ex   = ex + 1;
    end
    if (ex <= 0)        return {s, 31'd0};
    else if (ex >= 255) return {s, 8'hff, 23'd0};
    else                return {s, ex[7:0], mant[22:0]};
  endfunction

endmodule
