// tb_plms_ctrl: checks the phase sequence of one iteration for random gain
// latencies: SHIFT on the accepting clock, PROD with the switch start on the
// next, no tap operation while waiting for k_valid, then UPD1, UPD2 and
// UPD3 with out_valid, and in_ready low from acceptance until the next IDLE.
module tb_plms_ctrl;
  import plms_pkg::*;
  logic    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, k_valid = 1'b0;
  logic    in_ready, sw_start, out_valid;
  tap_op_e tap_op;
  int checks = 0, failures = 0;

  plms_ctrl dut (.clk, .rst_n, .in_valid, .in_ready, .k_valid, .tap_op, .sw_start, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input string what, input logic rdy, input tap_op_e op,
                            input logic st, input logic ov);
    checks++;
    if (in_ready !== rdy || tap_op !== op || sw_start !== st || out_valid !== ov) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: ready %b op %s start %b out %b", what, in_ready, tap_op.name(),
                 sw_start, out_valid);
    end
  endtask

  initial begin
    int wait_cycles;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_out("idle", 1'b1, TAP_IDLE, 1'b0, 1'b0);
    for (int n = 0; n < 500; n++) begin
      in_valid = 1'b1;
      #1 expect_out("accept", 1'b1, TAP_SHIFT, 1'b0, 1'b0);
      @(posedge clk); #1 in_valid = 1'b0;
      expect_out("prod", 1'b0, TAP_PROD, 1'b1, 1'b0);
      @(posedge clk); #1;
      wait_cycles = int'($urandom_range(70));
      repeat (wait_cycles) begin
        // a sample offered now must be stalled
        in_valid = 1'($urandom_range(1));
        #1 expect_out("wait", 1'b0, TAP_IDLE, 1'b0, 1'b0);
        @(posedge clk); #1;
      end
      in_valid = 1'b0;
      k_valid = 1'b1;
      #1 expect_out("k", 1'b0, TAP_IDLE, 1'b0, 1'b0);
      @(posedge clk); #1 k_valid = 1'b0;
      expect_out("upd1", 1'b0, TAP_UPD1, 1'b0, 1'b0);
      @(posedge clk); #1;
      expect_out("upd2", 1'b0, TAP_UPD2, 1'b0, 1'b0);
      @(posedge clk); #1;
      expect_out("upd3", 1'b0, TAP_UPD3, 1'b0, 1'b1);
      @(posedge clk); #1;
      expect_out("back", 1'b1, TAP_IDLE, 1'b0, 1'b0);
      repeat ($urandom_range(2)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
