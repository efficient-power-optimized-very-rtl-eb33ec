// tb_gain_block: random error and gamma sums; k must equal mu*L*e/sum within
// the divider's 7.3 %, with the right sign, one clock after in_valid.
module tb_gain_block;
  import plms_pkg::*;
  localparam int unsigned L  = 32;
  localparam fp32_t       MU = 32'h3C23_D70A;   // 0.01

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fp32_t e, gamma_sum, k;
  logic  k_valid;
  int checks = 0, failures = 0;

  gain_block #(.L(L), .MU(MU)) dut (.clk, .rst_n, .in_valid, .e, .gamma_sum, .k, .k_valid);

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


  initial begin
    real re, rs, want;
    e = '0; gamma_sum = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      re = ($urandom_range(200000) - 100000.0) / 10000.0;
      rs = (1.0 + $urandom_range(100000)) / 1000.0;
      e = r2f(re); gamma_sum = r2f(rs); re = f2r(e); rs = f2r(gamma_sum);
      want = f2r(MU) * L * re / rs;
      in_valid = 1'b1;
      @(posedge clk); #1 in_valid = 1'b0;
      checks++;
      if (!k_valid || fabs(f2r(k) - want) > 0.073 * fabs(want) || (k[31] != e[31] && re != 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL e=%g S=%g k=%g want %g", re, rs, f2r(k), want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
