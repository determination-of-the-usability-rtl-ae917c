// qr_calc_givens: sine and cosine of the Givens rotation that zeroes the
// element e2 under e1 in the QR kernel ("QR_Calc_Givens").
//
// e1 is the element on the rotation's upper row and e2 the element below
// it in the same column (a_pp and a_qp in the QR sweep, a_p,p-1 and
// a_q,p-1 in the Hessenberg reduction).  The cases are the classic
// overflow-safe ones:
//   e2 = 0:          c = sign(e1),  s = 0
//   e1 = 0:          c = 0,         s = -sign(e2)
//   |e2| > |e1|:     t = e1/e2, u = sign(e2)*sqrt(1+t*t), s = -1/u, c = -s*t
//   otherwise:       t = e2/e1, u = sign(e1)*sqrt(1+t*t), c =  1/u, s = -c*t
// so that s*e1 + c*e2 = 0 and c*e1 - s*e2 = |r|.  The case split and the
// formulas are the original kernel's; the sequencing over one adder, one
// multiplier, one divider and one square-root unit is this design's.
//
// Timing: start (pulse) latches e1, e2; done pulses when s and c are
// valid: 2 cycles later for the two zero cases, 91 cycles later
// otherwise.  s and c hold until the next start.
module qr_calc_givens
  import eig_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t e1,
  input  fp32_t e2,
  output logic  busy,
  output logic  done,
  output fp32_t s,
  output fp32_t c
);

  typedef enum logic [3:0] {
    S_IDLE, S_T_GO, S_T, S_Q, S_U_GO, S_U, S_R_GO, S_R, S_FIN, S_DONE
  } state_t;

  state_t state_q;
  logic   swap_q;            // 1: |e2| > |e1|, t = e1/e2
  fp32_t  num_q, den_q, t_q, x_q, r_q;

  fp32_t add_y, mul_a, mul_b, mul_y, div_a, div_b, div_y, sqrt_y;
  logic  div_go, div_done, sqrt_go, sqrt_done, div_busy, sqrt_busy;

  fp32_add  u_add  (.a(FP_ONE), .b(mul_y), .y(add_y));
  fp32_mul  u_mul  (.a(mul_a), .b(mul_b), .y(mul_y));
  fp32_div  u_div  (.clk, .rst_n, .start(div_go), .a(div_a), .b(div_b),
                    .busy(div_busy), .done(div_done), .y(div_y));
  fp32_sqrt u_sqrt (.clk, .rst_n, .start(sqrt_go), .a(x_q),
                    .busy(sqrt_busy), .done(sqrt_done), .y(sqrt_y));

  always_comb begin
    mul_a   = t_q;
    mul_b   = t_q;
    div_a   = num_q;
    div_b   = den_q;
    div_go  = 1'b0;
    sqrt_go = 1'b0;
    unique case (state_q)
      S_T_GO: div_go = 1'b1;
      S_U_GO: sqrt_go = 1'b1;
      S_R_GO: begin div_a = FP_ONE; div_b = x_q; div_go = 1'b1; end
      S_FIN:  begin mul_a = swap_q ? fp_neg(r_q) : r_q; mul_b = t_q; end
      default: ;
    endcase
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      swap_q  <= 1'b0;
      {num_q, den_q, t_q, x_q, r_q} <= '0;
      s    <= FP_ZERO;
      c    <= FP_ONE;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          if (fp_is_zero(e2)) begin
            c <= fp_copysign(FP_ONE, e1);
            s <= FP_ZERO;
            state_q <= S_DONE;
          end else if (fp_is_zero(e1)) begin
            c <= FP_ZERO;
            s <= fp_neg(fp_copysign(FP_ONE, e2));
            state_q <= S_DONE;
          end else if (fp_mag_gt(e2, e1)) begin
            swap_q <= 1'b1; num_q <= e1; den_q <= e2;
            state_q <= S_T_GO;
          end else begin
            swap_q <= 1'b0; num_q <= e2; den_q <= e1;
            state_q <= S_T_GO;
          end
        end
        S_T_GO: state_q <= S_T;
        S_T:    if (div_done) begin t_q <= div_y; state_q <= S_Q; end
        S_Q:    begin x_q <= add_y; state_q <= S_U_GO; end      // 1 + t*t
        S_U_GO: state_q <= S_U;
        S_U:    if (sqrt_done) begin                            // u = sign(den)*sqrt
          x_q <= fp_copysign(sqrt_y, den_q);
          state_q <= S_R_GO;
        end
        S_R_GO: state_q <= S_R;
        S_R:    if (div_done) begin r_q <= div_y; state_q <= S_FIN; end   // 1/u
        S_FIN: begin
          if (swap_q) begin s <= fp_neg(r_q); c <= fp_neg(mul_y); end
          else        begin c <= r_q;         s <= fp_neg(mul_y); end
          state_q <= S_DONE;
        end
        S_DONE: begin done <= 1'b1; state_q <= S_IDLE; end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
