// plms_pkg: types and constants shared by the PLMS adaptive filter.
//
// All datapath values are IEEE-754 single precision words (1 sign bit,
// 8 exponent bits, 23 fraction bits). The floating-point units of this
// design flush subnormal inputs to zero, truncate instead of rounding and
// give no special meaning to Inf/NaN inputs; those are design choices, the
// format itself is the one the filter architecture is built around.
//
// The tap operation code is broadcast by the controller to every tap block
// and selects which clock phase the taps execute.
package plms_pkg;

  typedef logic [31:0] fp32_t;

  localparam int unsigned FP_BIAS   = 127;

  localparam fp32_t FP_ZERO = 32'h0000_0000;

  // Operations a tap block can perform in one clock phase.
  typedef enum logic [2:0] {
    TAP_IDLE  = 3'd0,  // hold every register
    TAP_SHIFT = 3'd1,  // regressor shift: x_i <= x_(i-1)
    TAP_PROD  = 3'd2,  // tap-out p_i <= x_i*w_i, gamma_i <= |w_i| + rho
    TAP_UPD1  = 3'd3,  // t_i <= gamma_i * x_i
    TAP_UPD2  = 3'd4,  // t_i <= t_i * k  (k = mu*e/mean(gamma))
    TAP_UPD3  = 3'd5   // w_i <= w_i + t_i
  } tap_op_e;

  // Which quantity the switches are feeding to the serial adder.
  typedef enum logic {
    SW_TAPOUT = 1'b0,  // switch 1: tap-outs, sum is the filter output y(n)
    SW_GAMMA  = 1'b1   // switch 2: gamma values, sum is sum_i gamma_i
  } sw_phase_e;

  // Absolute value of an FP32 word.
  function automatic fp32_t fp_abs(input fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  // Negation of an FP32 word.
  function automatic fp32_t fp_neg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Exact FP32 encoding of a positive integer below 2^24 (elaboration-time
  // constant for the filter length).
  function automatic fp32_t int_to_fp32(input int unsigned v);
    int unsigned msb;
    logic [31:0] m;
    if (v == 0) return FP_ZERO;
    msb = 0;
    for (int i = 0; i < 32; i++) if (v[i]) msb = i;
    m = 32'(v) << (23 - msb);
    return {1'b0, 8'(FP_BIAS + msb), m[22:0]};
  endfunction

endpackage
