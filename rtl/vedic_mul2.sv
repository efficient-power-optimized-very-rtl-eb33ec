// vedic_mul2: 2x2-bit Urdhva-Tiryagbhyam (vertical and crosswise) multiplier,
// the leaf cell of the Vedic multiplier tree. The vertical products give the
// outer bits, the two crosswise products are added by a half adder, and the
// carry combines with the upper vertical product. Purely combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c0, c1, s1, cx;

  always_comb begin
    p[0] = a[0] & b[0];
    // crosswise half adder
    s1   = (a[1] & b[0]) ^ (a[0] & b[1]);
    c0   = (a[1] & b[0]) & (a[0] & b[1]);
    p[1] = s1;
    // upper vertical product plus the crosswise carry
    c1   = a[1] & b[1];
    p[2] = c1 ^ c0;
    cx   = c1 & c0;
    p[3] = cx;
  end
endmodule
