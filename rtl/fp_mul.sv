// fp_mul: IEEE-754 single precision multiplier (combinational).
//
// The product of the significands (1+m1)(1+m2) is split as
//   1 + (m1 + m2) + m1*m2,
// so the fraction part needs one 23-bit adder (m1 + m2), one Vedic
// multiplier (m1 * m2, a 24x24 array of 8x8 Vedic cells) and a second adder
// that sums the two. The combined carry of the adders tells whether the
// significand product reached 2: it drives a one-bit shifter and is added to
// the exponent sum e1 + e2 - 127. The sign is the XOR of the input signs.
//
// Design choices (not fixed by the architecture): the result is truncated,
// subnormal inputs and results are flushed to signed zero, exponent overflow
// gives +/-Inf, Inf/NaN inputs are not treated specially.
//
// Interface: a, b -> y = a*b, same cycle.
module fp_mul
  import plms_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  logic              s;
  logic [7:0]        ea, eb;
  logic [22:0]       m1, m2;
  logic [23:0]       frac_sum;     // m1 + m2, with its carry
  logic [47:0]       frac_prod;    // m1 * m2 from the Vedic multiplier
  logic [47:0]       sig;          // (1+m1)(1+m2) scaled by 2^46
  logic              carry;
  logic [22:0]       mres;
  logic signed [9:0] eres;

  vedic_mul24 u_vedic (.a({1'b0, m1}), .b({1'b0, m2}), .p(frac_prod));

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    m1 = a[22:0];
    m2 = b[22:0];

    frac_sum = {1'b0, m1} + {1'b0, m2};
    sig      = (48'd1 << 46) + (48'(frac_sum) << 23) + frac_prod;
    carry    = sig[47];
    mres     = carry ? sig[46:24] : sig[45:23];
    eres     = $signed({2'b00, ea}) + $signed({2'b00, eb}) - 10'sd127
             + $signed({9'd0, carry});

    if (ea == 8'd0 || eb == 8'd0 || eres <= 10'sd0) begin
      y = {s, 31'd0};
    end else if (eres >= 10'sd255) begin
      y = {s, 8'hFF, 23'd0};
    end else begin
      y = {s, eres[7:0], mres};
    end
  end
endmodule
