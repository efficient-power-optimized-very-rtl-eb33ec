// tb_plms_tap: drives one tap block through load, shift, product and the
// three update phases with random operands and compares every register
// with a real-valued model of the same phase (relative tolerance 1e-5).
module tb_plms_tap;
  import plms_pkg::*;
  localparam fp32_t RHO = 32'h3C23_D70A;   // 0.01

  logic    clk = 1'b0, rst_n = 1'b0;
  tap_op_e op;
  fp32_t   x_in, k, load_w, x_q, w_q, p_q, g_q;
  logic    load_en;
  int checks = 0, failures = 0;

  plms_tap #(.RHO(RHO)) dut (.clk, .rst_n, .op, .x_in, .k, .load_en, .load_w,
                             .x_q, .w_q, .p_q, .g_q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f2r(input logic [31:0] v);
    logic [10:0] e11;
    if (v[30:23] == 8'd0) return 0.0;
    e11 = 11'(v[30:23]) + 11'd896;      // rebias 127 -> 1023
    return $bitstoreal({v[31], e11, v[22:0], 29'd0});
  endfunction

  // real to IEEE-754 single (truncated; magnitudes assumed in range)
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [10:0] e11;
    if (r == 0.0) return 32'd0;
    d   = $realtobits(r);
    e11 = d[62:52] - 11'd896;
    return {d[63], e11[7:0], d[51:29]};
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction


  task automatic chk(input string what, input real got, input real expect_v);
    checks++;
    if (fabs(got - expect_v) > 1e-5 * fabs(expect_v) + 1e-30) begin
      failures++;
      if (failures < 10) $display("FAIL %s: expected %g got %g", what, expect_v, got);
    end
  endtask

  task automatic step(input tap_op_e o);
    op = o;
    @(posedge clk);
    #1;
    op = TAP_IDLE;
  endtask

  initial begin
    real x, w, kk, g, t;
    op = TAP_IDLE; x_in = '0; k = '0; load_en = 1'b0; load_w = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk("reset w", f2r(w_q), 0.0);
    for (int n = 0; n < 1000; n++) begin
      x  = ($urandom_range(2000) - 1000.0) / 1000.0;
      w  = ($urandom_range(2000) - 1000.0) / 500.0;
      kk = ($urandom_range(2000) - 1000.0) / 1.0e5;
      // initial weight through the load switch
      load_en = 1'b1; load_w = r2f(w);
      @(posedge clk); #1 load_en = 1'b0;
      w = f2r(load_w);
      chk("load", f2r(w_q), w);
      x_in = r2f(x); x = f2r(x_in);
      step(TAP_SHIFT);
      chk("shift", f2r(x_q), x);
      step(TAP_PROD);
      chk("tap-out", f2r(p_q), x * w);
      g = fabs(w) + f2r(RHO);
      chk("gamma", f2r(g_q), g);
      // an idle phase must hold everything
      step(TAP_IDLE);
      chk("hold", f2r(p_q), x * w);
      step(TAP_UPD1);
      t = g * x;
      k = r2f(kk); kk = f2r(k);
      step(TAP_UPD2);
      t = t * kk;
      step(TAP_UPD3);
      chk("update", f2r(w_q), w + t);
      checks++;
      if (x_q !== x_in) begin failures++; $display("FAIL x changed by update"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
