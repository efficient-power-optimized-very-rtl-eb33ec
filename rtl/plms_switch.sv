// plms_switch: switch 1 / switch 2 in front of the serial adder.
//
// After the taps have produced their tap-outs p_i and gamma values g_i in
// the same clock phase, a start pulse makes the switch forward them to the
// serial adder one per clock: first switch 1 is active and p_0..p_(L-1) are
// sent (their sum is the filter output y(n)), then switch 2 is active and
// g_0..g_(L-1) are sent (their sum is the gamma sum that normalises the
// proportionate gains). Each value goes out with first/last markers and the
// phase tag, so the adder knows where a sum starts and ends.
//
// Timing: start in cycle t; values leave in cycles t+1 .. t+2L; busy is high
// while values are leaving. A start while busy is ignored.
// The architecture places switches between groups of taps; here a single
// scanning switch per quantity serves all taps, which is this design's
// choice.
module plms_switch
  import plms_pkg::*;
#(
  parameter int unsigned L = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  fp32_t     p   [L],
  input  fp32_t     g   [L],
  output logic      out_valid,
  output logic      out_first,
  output logic      out_last,
  output sw_phase_e out_phase,
  output fp32_t     out_data,
  output logic      busy
);
  localparam int unsigned IW = (L > 1) ? $clog2(L) : 1;

  logic      active;
  logic [IW-1:0] idx;
  sw_phase_e phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      idx    <= '0;
      phase  <= SW_TAPOUT;
    end else if (!active) begin
      if (start) begin
        active <= 1'b1;
        idx    <= '0;
        phase  <= SW_TAPOUT;
      end
    end else if (idx == IW'(L - 1)) begin
      idx <= '0;
      if (phase == SW_TAPOUT) phase  <= SW_GAMMA;  // switch 1 -> switch 2
      else                    active <= 1'b0;
    end else begin
      idx <= idx + 1'b1;
    end
  end

  always_comb begin
    out_valid = active;
    out_first = active && (idx == '0);
    out_last  = active && (idx == IW'(L - 1));
    out_phase = phase;
    out_data  = (phase == SW_TAPOUT) ? p[idx] : g[idx];
    busy      = active;
  end
endmodule
