// gain_block: proportionate gain normalisation.
//
// PLMS gives tap i the gain g_i = gamma_i / mean(gamma), gamma_i = |w_i| +
// rho. Since every tap needs mu * g_i * e(n), the common factor
//   k = mu * e(n) / mean(gamma) = (e(n) / sum(gamma)) * mu * L
// is formed once per iteration here and broadcast to the taps, which
// multiply it by their own gamma_i. One approximate FP divider (e/sum) and
// two FP multipliers (by mu and by L) are used; mu and L are constants.
//
// Timing: in_valid with e and gamma_sum in cycle t; k valid (k_valid pulse)
// in t+1.
// Sharing one divider among all taps rather than dividing per tap is this
// design's choice; the result is the same gain matrix G(n).
module gain_block
  import plms_pkg::*;
#(
  parameter int unsigned L  = 32,
  parameter fp32_t       MU = 32'h3C23_D70A   // 0.01
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t e,
  input  fp32_t gamma_sum,
  output fp32_t k,
  output logic  k_valid
);
  localparam fp32_t L_FP = int_to_fp32(L);

  fp32_t q, q_mu, q_mu_l;

  fp_div u_div  (.a(e),    .b(gamma_sum), .y(q));
  fp_mul u_mu   (.a(q),    .b(MU),        .y(q_mu));
  fp_mul u_len  (.a(q_mu), .b(L_FP),      .y(q_mu_l));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k       <= FP_ZERO;
      k_valid <= 1'b0;
    end else begin
      k_valid <= in_valid;
      if (in_valid) k <= q_mu_l;
    end
  end
endmodule
