// plms_ctrl: clock-phase sequencer of one PLMS iteration.
//
// States and what the taps do in each:
//   IDLE : in_ready = 1. A new sample (in_valid) is accepted: the taps shift
//          the regressor (TAP_SHIFT) and the desired sample is latched.
//   PROD : taps form tap-outs and gammas (TAP_PROD); the switch is started.
//   SUM  : switch 1 then switch 2 stream to the serial adder; the error block
//          and the gain block follow. Wait for k_valid.
//   UPD1, UPD2, UPD3 : the three weight-update phases of the taps.
//          out_valid is raised in UPD3, when y(n) and e(n) are final.
// One iteration therefore takes 2L + 7 clocks from acceptance to the next
// IDLE cycle (1 accept + 1 PROD + 2L streaming + 1 adder + 1 gain + 3 UPD),
// during which in_ready is low (the source is stalled).
// The phase order follows the architecture (tap-outs, switch 1, switch 2,
// weight update); the exact state split is this design's choice.
module plms_ctrl
  import plms_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  logic    k_valid,
  output tap_op_e tap_op,
  output logic    sw_start,
  output logic    out_valid
);
  typedef enum logic [2:0] {
    S_IDLE, S_PROD, S_SUM, S_UPD1, S_UPD2, S_UPD3
  } state_e;

  state_e state, state_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_n;
  end

  always_comb begin
    state_n   = state;
    in_ready  = 1'b0;
    tap_op    = TAP_IDLE;
    sw_start  = 1'b0;
    out_valid = 1'b0;
    unique case (state)
      S_IDLE: begin
        in_ready = 1'b1;
        if (in_valid) begin
          tap_op  = TAP_SHIFT;
          state_n = S_PROD;
        end
      end
      S_PROD: begin
        tap_op   = TAP_PROD;
        sw_start = 1'b1;
        state_n  = S_SUM;
      end
      S_SUM:  if (k_valid) state_n = S_UPD1;
      S_UPD1: begin tap_op = TAP_UPD1; state_n = S_UPD2; end
      S_UPD2: begin tap_op = TAP_UPD2; state_n = S_UPD3; end
      S_UPD3: begin
        tap_op    = TAP_UPD3;
        out_valid = 1'b1;
        state_n   = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  // the gain factor may only arrive while the controller waits for it
  a_k_in_sum: assert property (@(posedge clk) disable iff (!rst_n)
                               k_valid |-> state == S_SUM);
endmodule
