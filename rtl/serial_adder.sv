// serial_adder: accumulates a stream of FP32 values with one FP adder.
//
// Each valid input is added to the running sum; an input marked first
// restarts the sum (it is added to zero). When the input marked last has
// been added, the total appears on sum with a one-cycle sum_valid pulse and
// the tag that came with the stream (which quantity was summed).
//
// Timing: an input in cycle t is in the accumulator at t+1; the total of a
// stream whose last value arrives in cycle t is valid in cycle t+1.
// Additions are done in arrival order (tap 0 first); the rounding of the
// FP adder (truncation) therefore applies once per term.
module serial_adder
  import plms_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      in_first,
  input  logic      in_last,
  input  sw_phase_e in_tag,
  input  fp32_t     in_data,
  output fp32_t     sum,
  output logic      sum_valid,
  output sw_phase_e sum_tag
);
  fp32_t acc_q, add_y;

  fp_addsub u_add (.a(in_first ? FP_ZERO : acc_q), .b(in_data), .sub(1'b0), .y(add_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= FP_ZERO;
      sum_valid <= 1'b0;
      sum_tag   <= SW_TAPOUT;
    end else begin
      sum_valid <= in_valid && in_last;
      if (in_valid) begin
        acc_q <= add_y;
        if (in_last) sum_tag <= in_tag;
      end
    end
  end

  assign sum = acc_q;
endmodule
