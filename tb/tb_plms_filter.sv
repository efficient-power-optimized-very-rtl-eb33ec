// tb_plms_filter: end-to-end system identification with the filter at its
// default size (32 taps, mu = rho = 0.01).
//
// An unknown sparse FIR system h (4 non-zero taps out of 32) is driven with
// uniform random input in [-1, 1); its output is d(n). The filter starts
// from loaded initial weights (one wrong non-zero weight) and must identify
// h. For every sample the testbench checks, against a real-valued model:
//   - y(n) = sum w_i x(n-i) with the weights held before the sample,
//   - e(n) = d(n) - y(n),
//   - every w_i(n+1) = w_i + mu * gamma_i/mean(gamma) * x(n-i) * e(n), to the
//     7.3 % accuracy of the approximate divider,
//   - the latency: out_valid 2L+6 clocks after acceptance, next acceptance
//     2L+7 clocks after the previous one.
// After 4000 samples the error power must have fallen by 40 dB and every
// weight be within 5e-3 of h. Mechanisms counted and required at least once: weight
// load, input stall, switch 1 phase, switch 2 phase, gain factor, weight
// update.
module tb_plms_filter;
  import plms_pkg::*;
  localparam int unsigned L  = 32;
  localparam int          N  = 4000;
  localparam real         MU = 0.01;
  localparam real         RHO = 0.01;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, out_valid;
  fp32_t        x_in, d_in, y_out, e_out, w_load_data, w_rd_data;
  logic         w_load_valid = 1'b0;
  logic [4:0]   w_load_idx, w_rd_idx;
  int checks = 0, failures = 0;
  longint cyc = 0;

  plms_filter dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in, .out_valid, .y_out,
                   .e_out, .w_load_valid, .w_load_idx, .w_load_data, .w_rd_idx, .w_rd_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (N * (2 * L + 7) + 2000) @(posedge clk);
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


  // mechanism counters
  int n_load = 0, n_stall = 0, n_sw1 = 0, n_sw2 = 0, n_gain = 0, n_update = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (dut.sw_valid && dut.sw_first && dut.sw_phase == SW_TAPOUT) n_sw1++;
    if (dut.sw_valid && dut.sw_first && dut.sw_phase == SW_GAMMA)  n_sw2++;
    if (dut.k_valid) n_gain++;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  real h [L];
  real xh [L];      // regressor of the sample being offered
  real xa [L];      // regressor of the sample in flight
  real w_old [L];   // weights when the in-flight sample was accepted
  real da;          // desired sample in flight
  longint t_acc = 0;
  int  n_acc = 0;
  real p0 = 0.0, p1 = 0.0;

  // driver: offers sample n+1 as soon as sample n is accepted, so the
  // source sees in_ready low (stall) for the rest of the iteration
  initial begin
    real x, d;
    longint t_prev;
    x_in = '0; d_in = '0; w_load_idx = '0; w_load_data = '0; w_rd_idx = '0;
    foreach (h[i]) h[i] = 0.0;
    h[2] = 0.8; h[7] = -0.5; h[13] = 0.3; h[24] = -0.15;
    foreach (xh[i]) xh[i] = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // initial weights through the load port: one wrong non-zero weight
    @(negedge clk);
    w_load_valid = 1'b1; w_load_idx = 5'd30; w_load_data = r2f(0.25);
    @(negedge clk);
    w_load_valid = 1'b0;
    w_rd_idx = 5'd30;
    #1;
    chk("weight load", w_rd_data == r2f(0.25));
    if (w_rd_data == r2f(0.25)) n_load++;

    t_prev = 0;
    for (int n = 0; n < N; n++) begin
      for (int i = L - 1; i > 0; i--) xh[i] = xh[i - 1];
      x = ($urandom_range(2000000) - 1000000.0) / 1000000.0;
      x_in = r2f(x); xh[0] = f2r(x_in);
      d = 0.0;
      for (int i = 0; i < L; i++) d += h[i] * xh[i];
      d_in = r2f(d); d = f2r(d_in);
      in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      // accepted at the coming rising edge
      for (int i = 0; i < L; i++) w_old[i] = f2r(dut.w_q[i]);
      xa = xh;
      da = d;
      t_acc = cyc + 1;
      if (n > 0) chk("sample interval 2L+7", t_acc - t_prev == 2 * L + 7);
      t_prev = t_acc;
      n_acc++;
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  // checker: output, error and weight update of each sample
  initial begin
    real y_ref, mag, e_ref, gsum, upd, w_new;
    bit changed;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (!out_valid) @(negedge clk);
      chk("output latency 2L+6", cyc + 1 - t_acc == 2 * L + 6);
      y_ref = 0.0; mag = 0.0;
      for (int i = 0; i < L; i++) begin
        y_ref += w_old[i] * xa[i];
        mag   += fabs(w_old[i] * xa[i]);
      end
      chk($sformatf("y(%0d) %g vs %g", n, f2r(y_out), y_ref),
          fabs(f2r(y_out) - y_ref) <= 1e-5 * mag + 1e-12);
      e_ref = da - f2r(y_out);
      chk($sformatf("e(%0d) %g vs %g", n, f2r(e_out), e_ref),
          fabs(f2r(e_out) - e_ref) <= 1e-6 * (fabs(da) + fabs(f2r(y_out))) + 1e-12);
      if (n < 50)      p0 += e_ref * e_ref;
      if (n >= N - 50) p1 += e_ref * e_ref;
      @(negedge clk);
      // weight update against the PLMS equation
      gsum = 0.0;
      for (int i = 0; i < L; i++) gsum += fabs(w_old[i]) + RHO;
      changed = 1'b0;
      for (int i = 0; i < L; i++) begin
        upd   = MU * (fabs(w_old[i]) + RHO) / (gsum / L) * xa[i] * f2r(e_out);
        w_new = f2r(dut.w_q[i]);
        if (w_new != w_old[i]) changed = 1'b1;
        chk($sformatf("w%0d(%0d) %g vs %g", i, n, w_new, w_old[i] + upd),
            fabs(w_new - (w_old[i] + upd)) <= 0.08 * fabs(upd) + 1e-6 * fabs(w_old[i]) + 1e-12);
      end
      if (changed) n_update++;
    end

    $display("error power first 50: %g, last 50: %g", p0 / 50, p1 / 50);
    chk("error power down 40 dB", p1 < 1e-4 * p0);
    for (int i = 0; i < L; i++)
      chk($sformatf("final w%0d = %g, h = %g", i, f2r(dut.w_q[i]), h[i]),
          fabs(f2r(dut.w_q[i]) - h[i]) < 5e-3);
    $display("mechanisms: load %0d stall %0d switch1 %0d switch2 %0d gain %0d update %0d",
             n_load, n_stall, n_sw1, n_sw2, n_gain, n_update);
    chk("weight load seen", n_load > 0);
    chk("stall seen", n_stall > 0);
    chk("switch 1 phase seen", n_sw1 == N);
    chk("switch 2 phase seen", n_sw2 == N);
    chk("gain factor seen", n_gain == N);
    chk("weight update seen", n_update > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
