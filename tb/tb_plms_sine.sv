// tb_plms_sine: the filter at its default size identifies a system driven
// by a sine wave, the demonstration signal of the original Simulink model.
//
// x(n) = 0.9 sin(2 pi n / 20); d(n) is the output of a sparse 32-tap FIR
// system. With a single-tone input only the system's response at that
// frequency can be learnt, so the check is on the error: its power over the
// last 100 samples must be 60 dB below that over the first 100, and y(n) +
// e(n) must reproduce d(n) for every sample. Samples are offered as soon as
// the filter is ready.
module tb_plms_sine;
  import plms_pkg::*;
  localparam int unsigned L = 32;
  localparam int          N = 2000;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, out_valid;
  fp32_t      x_in, d_in, y_out, e_out, w_rd_data;
  logic [4:0] w_rd_idx = '0;
  int checks = 0, failures = 0;

  plms_filter dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in, .out_valid, .y_out,
                   .e_out, .w_load_valid(1'b0), .w_load_idx(5'd0), .w_load_data(32'd0),
                   .w_rd_idx, .w_rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (N * (2 * L + 7) + 1000) @(posedge clk);
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


  real h [L];
  real xh [L];

  initial begin
    real d, p0, p1, e;
    foreach (h[i]) h[i] = 0.0;
    h[1] = 0.6; h[5] = -0.4; h[11] = 0.25;
    foreach (xh[i]) xh[i] = 0.0;
    p0 = 0.0; p1 = 0.0;
    x_in = '0; d_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      for (int i = L - 1; i > 0; i--) xh[i] = xh[i - 1];
      @(negedge clk);
      x_in = r2f(0.9 * $sin(2.0 * 3.141592653589793 * n / 20.0));
      xh[0] = f2r(x_in);
      d = 0.0;
      for (int i = 0; i < L; i++) d += h[i] * xh[i];
      d_in = r2f(d); d = f2r(d_in);
      in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      while (!out_valid) @(negedge clk);
      e = f2r(e_out);
      checks++;
      if (fabs(f2r(y_out) + e - d) > 1e-6 * (fabs(d) + fabs(e)) + 1e-12) begin
        failures++;
        if (failures < 10) $display("FAIL y + e != d at %0d", n);
      end
      if (n < 100)      p0 += e * e;
      if (n >= N - 100) p1 += e * e;
    end
    $display("error power first 100: %g, last 100: %g", p0 / 100, p1 / 100);
    checks++;
    if (!(p1 < 1e-6 * p0)) begin
      failures++;
      $display("FAIL error did not converge by 60 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
