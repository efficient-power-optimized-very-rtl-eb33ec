// vedic_mul4: 4x4-bit Vedic multiplier built from four 2x2 Vedic cells.
// The low x low and high x high products are the vertical terms; the two
// crosswise (low x high) products are summed and added in at bit 2.
// Purely combinational.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [4:0] xsum;

  vedic_mul2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mul2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mul2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mul2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  always_comb begin
    xsum = {1'b0, q1} + {1'b0, q2};
    p     = {q3, q0} + {1'b0, xsum, 2'b00};
  end
endmodule
