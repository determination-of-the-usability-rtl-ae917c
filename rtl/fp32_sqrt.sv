// fp32_sqrt: single-precision floating-point square root, iterative.
//
// A pulse on start latches the operand.  The exponent is made even by
// doubling the significand when needed and then halved; the significand
// root is found by the digit-by-digit (restoring) method, one result bit
// per clock, 26 bits in all (hidden bit, 23 fraction bits, guard and
// round), with the final remainder as sticky bit, and rounded to nearest,
// ties to even.  done pulses for one cycle when y is valid; y holds until
// the next start.  Latency: 28 cycles from start to done (1 for zero,
// negative, infinite or NaN operands).  Subnormals read as zero; the root
// of a negative number is the quiet NaN, sqrt(-0) = -0.
module fp32_sqrt
  import eig_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  logic [51:0] rad_q;
  logic [29:0] rem_q;
  logic [25:0] root_q;
  logic [7:0]  e_q;
  logic [4:0]  cnt_q;
  logic        run_q, fin_q;

  assign busy = run_q | start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      fin_q  <= 1'b0;
      done   <= 1'b0;
      y      <= FP_ZERO;
      rad_q  <= '0;
      rem_q  <= '0;
      root_q <= '0;
      e_q    <= '0;
      cnt_q  <= '0;
    end else begin
      done  <= 1'b0;
      fin_q <= 1'b0;
      if (start) begin
        if (a[30:23] == 0) begin
          y    <= {a[31], 31'd0};
          done <= 1'b1;
        end else if (a[31] || (a[30:23] == 8'hff && a[22:0] != 0)) begin
          y    <= 32'h7fc0_0000;
          done <= 1'b1;
        end else if (a[30:23] == 8'hff) begin
          y    <= a;
          done <= 1'b1;
        end else begin
          // unbiased exponent E = e - 127 is odd exactly when e is even
          if (!a[23]) begin
            rad_q <= {1'b1, a[22:0], 28'd0};
            e_q   <= 8'((int'(a[30:23]) - 128) / 2 + 127);
          end else begin
            rad_q <= {2'b01, a[22:0], 27'd0};
            e_q   <= 8'((int'(a[30:23]) - 127) / 2 + 127);
          end
          rem_q  <= '0;
          root_q <= '0;
          cnt_q  <= 5'd26;
          run_q  <= 1'b1;
        end
      end else if (run_q) begin
        logic [29:0] r, t;
        r = {rem_q[27:0], rad_q[51:50]};
        t = {2'b00, root_q, 2'b01};
        if (r >= t) begin
          rem_q  <= r - t;
          root_q <= {root_q[24:0], 1'b1};
        end else begin
          rem_q  <= r;
          root_q <= {root_q[24:0], 1'b0};
        end
        rad_q <= rad_q << 2;
        cnt_q <= cnt_q - 5'd1;
        if (cnt_q == 5'd1) begin
          run_q <= 1'b0;
          fin_q <= 1'b1;
        end
      end else if (fin_q) begin
        logic [26:0] m;
        logic [24:0] mant;
        logic [7:0]  ex;
        m    = {root_q, rem_q != 0};
        ex   = e_q;
        mant = {1'b0, m[26:3]} + {24'd0, m[2] & (m[1] | m[0] | m[3])};
        if (mant[24]) begin
          mant = mant >> 1;
          ex   = ex + 8'd1;
        end
        y    <= {1'b0, ex, mant[22:0]};
        done <= 1'b1;
      end
    end
  end

endmodule
