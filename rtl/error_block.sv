// error_block: error computation e(n) = d(n) - y(n).
//
// The filter output y(n) from the serial adder is subtracted from the
// desired sample d(n) with an FP subtractor; e(n) is registered and flagged
// by a one-cycle e_valid pulse one clock after in_valid. The error is then
// fed back to the taps (through the gain block) without a delay.
module error_block
  import plms_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t d,
  input  fp32_t y,
  output fp32_t e,
  output logic  e_valid
);
  fp32_t diff;

  fp_addsub u_sub (.a(d), .b(y), .sub(1'b1), .y(diff));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e       <= FP_ZERO;
      e_valid <= 1'b0;
    end else begin
      e_valid <= in_valid;
      if (in_valid) e <= diff;
    end
  end
endmodule
