// vedic_mul24: 24x24-bit unsigned multiplier for floating-point mantissas,
// tiled from nine 8x8 Vedic multipliers.
//
// Each operand is split into three bytes. Byte product a_i*b_j is weighted
// by 2^(8*(i+j)); products of equal weight are the crosswise terms of the
// Vedic scheme and are added column by column. Purely combinational.
module vedic_mul24 (
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [47:0] p
);
  logic [15:0] pp [3][3];

  for (genvar i = 0; i < 3; i++) begin : g_row
    for (genvar j = 0; j < 3; j++) begin : g_col
      vedic_mul8 u_cell (.a(a[8*i +: 8]), .b(b[8*j +: 8]), .p(pp[i][j]));
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        p = p + (48'(pp[i][j]) << (8 * (i + j)));
      end
    end
  end
endmodule
