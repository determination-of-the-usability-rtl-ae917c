// jcb_calc_givens: sine and cosine of the Jacobi rotation that zeroes the
// pivot a_ij of a symmetric matrix ("JCB_Calc_Givens").
//
// Inputs are e1 = a_ii, e2 = a_ji (= a_ij, nonzero) and e3 = a_jj.  The
// unit evaluates, in single precision and in this order:
//   w = (e3 - e1) / (2*e2)                     (= cot 2θ)
//   t = -w - sqrt(w*w + 1)   if w < 0
//   t = -w + sqrt(w*w + 1)   otherwise          (= tan θ)
//   d = sqrt(1 + t*t);  s = t / d;  c = 1 / d
// which makes (c^2 - s^2) a_ij + cs (a_ii - a_jj) = 0, so the similarity
// transform G A G^T clears a_ij.  The formulas and the branch on the sign
// of w are the original kernel's; the sequencing over one adder, one
// multiplier, one divider and one square-root unit is this design's.
//
// Timing: start (pulse) latches e1..e3; done pulses when s and c are
// valid, 150 cycles later (three divisions and two roots of 28 cycles
// each plus the add/multiply steps).  s and c hold until the next start.
module jcb_calc_givens
  import eig_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t e1,
  input  fp32_t e2,
  input  fp32_t e3,
  output logic  busy,
  output logic  done,
  output fp32_t s,
  output fp32_t c
);

  typedef enum logic [3:0] {
    S_IDLE, S_PREP, S_W_GO, S_W, S_R2, S_R_GO, S_R, S_T, S_Q,
    S_D_GO, S_D, S_S_GO, S_S, S_C_GO, S_C
  } state_t;

  state_t state_q;
  fp32_t  e1_q, e2_q, e3_q, num_q, den_q, w_q, x_q, t_q, d_q;

  fp32_t add_a, add_b, add_y, mul_a, mul_b, mul_y;
  fp32_t div_a, div_b, div_y, sqrt_a, sqrt_y;
  logic  div_go, div_done, sqrt_go, sqrt_done;
  logic  div_busy, sqrt_busy;

  fp32_add  u_add  (.a(add_a), .b(add_b), .y(add_y));
  fp32_mul  u_mul  (.a(mul_a), .b(mul_b), .y(mul_y));
  fp32_div  u_div  (.clk, .rst_n, .start(div_go), .a(div_a), .b(div_b),
                    .busy(div_busy), .done(div_done), .y(div_y));
  fp32_sqrt u_sqrt (.clk, .rst_n, .start(sqrt_go), .a(sqrt_a),
                    .busy(sqrt_busy), .done(sqrt_done), .y(sqrt_y));

  // Operand selection per step.
  always_comb begin
    add_a  = FP_ZERO;
    add_b  = FP_ZERO;
    mul_a  = FP_ZERO;
    mul_b  = FP_ZERO;
    div_a  = FP_ONE;
    div_b  = FP_ONE;
    sqrt_a = x_q;
    div_go  = 1'b0;
    sqrt_go = 1'b0;
    unique case (state_q)
      S_PREP: begin                     // e3 - e1 and 2*e2
        add_a = e3_q;  add_b = fp_neg(e1_q);
        mul_a = FP_TWO; mul_b = e2_q;
      end
      S_W_GO: begin div_a = num_q; div_b = den_q; div_go = 1'b1; end
      S_R2: begin                       // w*w + 1
        mul_a = w_q; mul_b = w_q;
        add_a = mul_y; add_b = FP_ONE;
      end
      S_R_GO: sqrt_go = 1'b1;
      S_T: begin                        // -w -/+ sqrt(w*w + 1)
        add_a = fp_neg(w_q);
        add_b = w_q[31] ? fp_neg(x_q) : x_q;
      end
      S_Q: begin                        // 1 + t*t
        mul_a = t_q; mul_b = t_q;
        add_a = FP_ONE; add_b = mul_y;
      end
      S_D_GO: sqrt_go = 1'b1;
      S_S_GO: begin div_a = t_q;    div_b = d_q; div_go = 1'b1; end
      S_C_GO: begin div_a = FP_ONE; div_b = d_q; div_go = 1'b1; end
      default: ;
    endcase
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      {e1_q, e2_q, e3_q, num_q, den_q, w_q, x_q, t_q, d_q} <= '0;
      s    <= FP_ZERO;
      c    <= FP_ONE;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          e1_q <= e1; e2_q <= e2; e3_q <= e3;
          state_q <= S_PREP;
        end
        S_PREP: begin num_q <= add_y; den_q <= mul_y; state_q <= S_W_GO; end
        S_W_GO: state_q <= S_W;
        S_W:    if (div_done) begin w_q <= div_y; state_q <= S_R2; end
        S_R2:   begin x_q <= add_y; state_q <= S_R_GO; end
        S_R_GO: state_q <= S_R;
        S_R:    if (sqrt_done) begin x_q <= sqrt_y; state_q <= S_T; end
        S_T:    begin t_q <= add_y; state_q <= S_Q; end
        S_Q:    begin x_q <= add_y; state_q <= S_D_GO; end
        S_D_GO: state_q <= S_D;
        S_D:    if (sqrt_done) begin d_q <= sqrt_y; state_q <= S_S_GO; end
        S_S_GO: state_q <= S_S;
        S_S:    if (div_done) begin s <= div_y; state_q <= S_C_GO; end
        S_C_GO: state_q <= S_C;
        S_C:    if (div_done) begin c <= div_y; done <= 1'b1; state_q <= S_IDLE; end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
