// vedic_mul8: 8x8-bit Vedic (Urdhva-Tiryagbhyam) multiplier, the multiplier
// cell the filter's floating-point units are tiled from.
//
// Four 4x4 Vedic multipliers form the vertical (low x low, high x high) and
// crosswise (low x high, high x low) partial products. The crosswise pair is
// summed first and then added in at bit 4 to the concatenated vertical
// products, as in the classic Vedic recursion. Purely combinational: p is
// valid in the same cycle as a and b.
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;
  logic [8:0] xsum;

  vedic_mul4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_mul4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_mul4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_mul4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  always_comb begin
    xsum = {1'b0, q1} + {1'b0, q2};
    p     = {q3, q0} + {3'b000, xsum, 4'b0000};
  end
endmodule
