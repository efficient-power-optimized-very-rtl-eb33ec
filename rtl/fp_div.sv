// fp_div: approximate IEEE-754 single precision divider (combinational).
//
// Division is reduced to one subtraction and one multiplication. The
// reciprocal of the divisor significand 1.m2 is approximated by a straight
// line: the 23-bit fraction m2 is subtracted from a 24-bit constant C, the
// difference being read as a fraction with 24 bits after the point, so
//   r = C/2^24 - m2/2^24  ~=  1/(1.m2).
// The dividend significand is then multiplied by r as r + m1*r: the Vedic
// multiplier forms m1*r and an adder adds r. A normaliser shifts the
// quotient significand (between 0.46 and 1.93) left by 0..2 places and the
// shift is taken from the exponent e1 - e2 + 127. The sign is the XOR of the
// input signs.
//
// C = round((sqrt(12) - 2.5) * 2^24) = 24'hF6CF5D is the minimax choice for
// this slope: the quotient is within about +/-7.2 % of the exact one. That
// accuracy is enough where the filter uses the divider (normalising the
// proportionate gains), and is this design's choice.
// Other choices: a zero divisor gives +/-Inf, a zero dividend gives 0,
// subnormals are flushed, the result is truncated.
//
// Interface: a, b -> y ~= a/b, same cycle.
module fp_div
  import plms_pkg::*;
#(
  parameter logic [23:0] RECIP_C = 24'hF6CF5D
) (
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  logic              s;
  logic [7:0]        ea, eb;
  logic [22:0]       m1, m2;
  logic [23:0]       r;           // reciprocal seed, value r/2^24
  logic [47:0]       m1r;         // m1*r, value /2^47
  logic [47:0]       q;           // (1+m1)*r, value /2^47
  logic [1:0]        sh;
  logic [22:0]       mres;
  logic signed [9:0] eres;

  vedic_mul24 u_vedic (.a({1'b0, m1}), .b(r), .p(m1r));

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    m1 = a[22:0];
    m2 = b[22:0];

    r  = RECIP_C - {1'b0, m2};
    q  = (48'(r) << 23) + m1r;

    // q/2^47 lies in (0.46, 1.93): normalise so that bit 47 is the hidden bit
    if (q[47])      sh = 2'd0;
    else if (q[46]) sh = 2'd1;
    else            sh = 2'd2;
    mres = 23'((q << sh) >> 24);

    eres = $signed({2'b00, ea}) - $signed({2'b00, eb}) + 10'sd127
         - $signed({8'd0, sh});

    if (eb == 8'd0) begin
      y = {s, 8'hFF, 23'd0};
    end else if (ea == 8'd0 || eres <= 10'sd0) begin
      y = {s, 31'd0};
    end else if (eres >= 10'sd255) begin
      y = {s, 8'hFF, 23'd0};
    end else begin
      y = {s, eres[7:0], mres};
    end
  end
endmodule
