// fp_addsub: IEEE-754 single precision adder/subtractor (combinational).
//
// Structure, following the classic three-stage adder:
//  1. exponent comparison: the operand of larger magnitude is kept as the
//     reference, its exponent becomes the common exponent;
//  2. mantissa block: the other mantissa is shifted right by the exponent
//     difference, then the two are added or subtracted, the choice being the
//     XOR of the sign bits (after sub inverts b's sign);
//  3. normalisation: a carry out shifts the sum right by one and increments
//     the exponent, a cancellation shifts it left by the leading-zero count
//     and decrements the exponent.
// The result takes the sign of the larger operand.
//
// Design choices (not fixed by the architecture): three guard bits are kept
// during alignment, the result is truncated, subnormal inputs and results
// are flushed to zero, an exponent overflow gives +/-Inf and an exact
// cancellation gives +0. Inf/NaN inputs are not treated specially.
//
// Interface: a, b, sub (1: y = a - b, 0: y = a + b) -> y, same cycle.
module fp_addsub
  import plms_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);
  // Unpacked operands.
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;

  // Operand of larger (x) and smaller (z) magnitude.
  logic        sx, sz;
  logic [7:0]  ex, ez, ediff;
  logic [26:0] mx, mz, mz_sh;

  logic        eff_sub;
  logic [27:0] sum;
  logic [4:0]  msb;
  logic        found;
  logic signed [9:0] eres;
  logic [27:0] norm;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    // flush subnormals to zero: hidden bit only for a non-zero exponent
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};

    // exponent comparison block
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = {ma, 3'b000};
      sz = sb; ez = eb; mz = {mb, 3'b000};
    end else begin
      sx = sb; ex = eb; mx = {mb, 3'b000};
      sz = sa; ez = ea; mz = {ma, 3'b000};
    end
    ediff = ex - ez;
    mz_sh = (ediff > 8'd26) ? 27'd0 : (mz >> ediff);

    // mantissa block: add or subtract by the XOR of the signs
    eff_sub = sx ^ sz;
    if (eff_sub) sum = {1'b0, mx} - {1'b0, mz_sh};
    else         sum = {1'b0, mx} + {1'b0, mz_sh};

    // normalisation block: locate the leading one
    msb   = 5'd0;
    found = 1'b0;
    for (int i = 27; i >= 0; i--) begin
      if (!found && sum[i]) begin
        msb   = 5'(i);
        found = 1'b1;
      end
    end

    // the hidden bit belongs at position 26
    eres = $signed({2'b00, ex}) + $signed(10'(msb)) - 10'sd26;
    if (msb >= 5'd26) norm = sum >> (msb - 5'd26);
    else              norm = sum << (5'd26 - msb);

    if (!found || ex == 8'd0 || eres <= 10'sd0) begin
      y = FP_ZERO;                         // cancellation or underflow
    end else if (eres >= 10'sd255) begin
      y = {sx, 8'hFF, 23'd0};              // overflow to Inf
    end else begin
      y = {sx, eres[7:0], norm[25:3]};     // truncate the guard bits
    end
  end
endmodule
