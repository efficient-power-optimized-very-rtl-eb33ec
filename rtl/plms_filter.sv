// plms_filter: proportionate LMS (PLMS) adaptive filter, IEEE-754 single
// precision, L taps.
//
// For every input sample x(n) with desired sample d(n) the filter computes
//   y(n)   = sum_i w_i(n) x(n-i)
//   e(n)   = d(n) - y(n)
//   gamma_i = |w_i(n)| + rho,   g_i = gamma_i / mean(gamma)
//   w_i(n+1) = w_i(n) + mu * g_i * x(n-i) * e(n)
// i.e. LMS whose step is distributed over the taps in proportion to the
// weight magnitudes, which speeds up identification of sparse systems.
//
// Structure: L tap blocks (plms_tap) form a delay line for x and each owns
// an FP multiplier and adder. In one clock phase all taps form their
// tap-outs and gammas; the switch (plms_switch) then feeds the tap-outs
// (switch 1) and the gammas (switch 2) one per clock to a single serial FP
// adder (serial_adder). The first sum is y(n), which the error block turns
// into e(n); the second sum goes with e(n) to the gain block, which forms
// k = mu*e/mean(gamma). Three more phases update all weights in parallel.
// plms_ctrl sequences the phases.
//
// Interface:
//   in_valid/in_ready  : x_in, d_in accepted when both are high.
//   out_valid          : one-cycle pulse with y_out = y(n), e_out = e(n)
//                        of the last accepted sample, 2L+6 clocks after it.
//   w_load_*           : initial weight w_load_data into tap w_load_idx,
//                        taken when w_load_valid and in_ready are high.
//   w_rd_idx/w_rd_data : combinational read-back of any weight.
//   in_ready is low for 2L+6 clocks after each accepted sample.
// Defaults: L = 32 taps ("32 filter length"), 32-bit IEEE-754 data; mu and
// rho are this design's choice (0.01 each).
module plms_filter
  import plms_pkg::*;
#(
  parameter int unsigned L   = 32,
  parameter fp32_t       MU  = 32'h3C23_D70A,   // 0.01
  parameter fp32_t       RHO = 32'h3C23_D70A,   // 0.01
  localparam int unsigned IW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  fp32_t         x_in,
  input  fp32_t         d_in,
  output logic          out_valid,
  output fp32_t         y_out,
  output fp32_t         e_out,
  input  logic          w_load_valid,
  input  logic [IW-1:0] w_load_idx,
  input  fp32_t         w_load_data,
  input  logic [IW-1:0] w_rd_idx,
  output fp32_t         w_rd_data
);
  tap_op_e   tap_op;
  logic      sw_start, k_valid, e_valid;
  fp32_t     k, e_q, d_q, y_q;
  fp32_t     x_q [L];
  fp32_t     w_q [L];
  fp32_t     p_q [L];
  fp32_t     g_q [L];

  logic      sw_valid, sw_first, sw_last, sw_busy;
  sw_phase_e sw_phase, sum_tag;
  fp32_t     sw_data, sum;
  logic      sum_valid;

  plms_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .k_valid,
    .tap_op, .sw_start, .out_valid
  );

  // desired sample is held for the error block
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= FP_ZERO;
      y_q <= FP_ZERO;
    end else begin
      if (in_valid && in_ready) d_q <= d_in;
      if (sum_valid && sum_tag == SW_TAPOUT) y_q <= sum;
    end
  end

  for (genvar i = 0; i < L; i++) begin : g_tap
    plms_tap #(.RHO(RHO)) u_tap (
      .clk, .rst_n,
      .op      (tap_op),
      .x_in    ((i == 0) ? x_in : x_q[(i == 0) ? 0 : i - 1]),
      .k       (k),
      .load_en (w_load_valid && in_ready && w_load_idx == IW'(i)),
      .load_w  (w_load_data),
      .x_q     (x_q[i]),
      .w_q     (w_q[i]),
      .p_q     (p_q[i]),
      .g_q     (g_q[i])
    );
  end

  plms_switch #(.L(L)) u_switch (
    .clk, .rst_n,
    .start     (sw_start),
    .p         (p_q),
    .g         (g_q),
    .out_valid (sw_valid),
    .out_first (sw_first),
    .out_last  (sw_last),
    .out_phase (sw_phase),
    .out_data  (sw_data),
    .busy      (sw_busy)
  );

  serial_adder u_sadd (
    .clk, .rst_n,
    .in_valid  (sw_valid),
    .in_first  (sw_first),
    .in_last   (sw_last),
    .in_tag    (sw_phase),
    .in_data   (sw_data),
    .sum       (sum),
    .sum_valid (sum_valid),
    .sum_tag   (sum_tag)
  );

  error_block u_err (
    .clk, .rst_n,
    .in_valid (sum_valid && sum_tag == SW_TAPOUT),
    .d        (d_q),
    .y        (sum),
    .e        (e_q),
    .e_valid  (e_valid)
  );

  gain_block #(.L(L), .MU(MU)) u_gain (
    .clk, .rst_n,
    .in_valid  (sum_valid && sum_tag == SW_GAMMA),
    .e         (e_q),
    .gamma_sum (sum),
    .k         (k),
    .k_valid   (k_valid)
  );

  assign y_out     = y_q;
  assign e_out     = e_q;
  assign w_rd_data = w_q[w_rd_idx];

  // the error must be ready before the gamma sum reaches the gain block
  a_err_first: assert property (@(posedge clk) disable iff (!rst_n)
                                (sum_valid && sum_tag == SW_GAMMA) |-> !e_valid);
  // the switch is never restarted while streaming
  a_sw_start: assert property (@(posedge clk) disable iff (!rst_n)
                               sw_start |-> !sw_busy);
endmodule
