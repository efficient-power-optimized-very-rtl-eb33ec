// tb_plms_switch: starts the switch with random tap-out and gamma vectors
// and checks the stream: L tap-outs (switch 1) then L gammas (switch 2) in
// tap order, one per clock beginning one clock after start, with first/last
// markers, and no output before start or after the 2L-th value. A start
// while busy must be ignored.
module tb_plms_switch;
  import plms_pkg::*;
  localparam int unsigned L = 32;

  logic      clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fp32_t     p [L];
  fp32_t     g [L];
  logic      out_valid, out_first, out_last, busy;
  sw_phase_e out_phase;
  fp32_t     out_data;
  int checks = 0, failures = 0;

  plms_switch #(.L(L)) dut (.clk, .rst_n, .start, .p, .g, .out_valid, .out_first,
                            .out_last, .out_phase, .out_data, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: expected %b got %b", what, want, got);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      foreach (p[i]) p[i] = $urandom;
      foreach (g[i]) g[i] = $urandom;
      repeat ($urandom_range(3)) begin
        @(posedge clk); #1 expect_bit("idle valid", out_valid, 1'b0);
      end
      start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      for (int c = 0; c < 2 * L; c++) begin
        automatic int i = c % L;
        expect_bit("valid", out_valid, 1'b1);
        expect_bit("first", out_first, i == 0);
        expect_bit("last", out_last, i == L - 1);
        expect_bit("phase", out_phase == SW_GAMMA, c >= L);
        checks++;
        if (out_data !== ((c < L) ? p[i] : g[i])) begin
          failures++;
          if (failures < 10) $display("FAIL data %0d: %h", c, out_data);
        end
        // a start in the middle of streaming has no effect
        start = (c == 5);
        @(posedge clk); #1 start = 1'b0;
      end
      expect_bit("done", out_valid, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
