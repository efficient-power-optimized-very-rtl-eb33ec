// plms_tap: one tap block of the PLMS adaptive filter.
//
// A tap holds the regressor sample x_i = x(n-i), the weight w_i and three
// working registers, and owns one FP multiplier and one FP adder that are
// reused in successive clock phases selected by the broadcast operation op:
//   TAP_SHIFT : x_i <= x_in (the previous tap's sample; a delay-line step)
//   TAP_PROD  : p_i <= x_i * w_i           (tap-out, partial filter output)
//               g_i <= |w_i| + RHO          (proportionate gain numerator)
//   TAP_UPD1  : t_i <= g_i * x_i
//   TAP_UPD2  : t_i <= t_i * k              (k = mu*e(n)/mean(gamma))
//   TAP_UPD3  : w_i <= w_i + t_i            (PLMS weight update, Eq. 1)
// so that after UPD3 w_i(n+1) = w_i(n) + mu * g_i(n) * x(n-i) * e(n) with
// g_i = gamma_i / mean(gamma). The error is used without delay (no DLMS
// delay M). Each phase takes one clock; results are registered.
// load_en writes an initial weight load_w in any cycle (it has priority
// over an update in the same cycle).
//
// Taken from the architecture: per-tap multiplier producing tap-out and
// gain term, gamma = |w| + rho. This design's choices: the split of the
// update into three phases, the register set and the reset values (zero).
module plms_tap
  import plms_pkg::*;
#(
  parameter fp32_t RHO = 32'h3C23_D70A   // 0.01
) (
  input  logic    clk,
  input  logic    rst_n,
  input  tap_op_e op,
  input  fp32_t   x_in,
  input  fp32_t   k,
  input  logic    load_en,
  input  fp32_t   load_w,
  output fp32_t   x_q,
  output fp32_t   w_q,
  output fp32_t   p_q,
  output fp32_t   g_q
);
  fp32_t t_q;
  fp32_t mul_a, mul_b, mul_y;
  fp32_t add_a, add_b, add_y;

  fp_mul    u_mul (.a(mul_a), .b(mul_b), .y(mul_y));
  fp_addsub u_add (.a(add_a), .b(add_b), .sub(1'b0), .y(add_y));

  // operand switch of the shared multiplier and adder
  always_comb begin
    mul_a = x_q;
    mul_b = w_q;
    add_a = fp_abs(w_q);
    add_b = RHO;
    unique case (op)
      TAP_UPD1: begin mul_a = g_q; mul_b = x_q; end
      TAP_UPD2: begin mul_a = t_q; mul_b = k;   end
      TAP_UPD3: begin add_a = w_q; add_b = t_q; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= FP_ZERO;
      w_q <= FP_ZERO;
      p_q <= FP_ZERO;
      g_q <= FP_ZERO;
      t_q <= FP_ZERO;
    end else begin
      unique case (op)
        TAP_SHIFT: x_q <= x_in;
        TAP_PROD: begin
          p_q <= mul_y;
          g_q <= add_y;
        end
        TAP_UPD1, TAP_UPD2: t_q <= mul_y;
        TAP_UPD3: w_q <= add_y;
        default: ;
      endcase
      if (load_en) w_q <= load_w;
    end
  end
endmodule
