// tb_error_block: random d(n), y(n); e(n) must equal d - y (within 2^-21 of
// the larger operand) one clock after in_valid, with a one-clock e_valid.
module tb_error_block;
  import plms_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fp32_t d, y, e;
  logic  e_valid;
  int checks = 0, failures = 0;

  error_block dut (.clk, .rst_n, .in_valid, .d, .y, .e, .e_valid);

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
    real rd, ry;
    d = '0; y = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      rd = ($urandom_range(200000) - 100000.0) / 50000.0;
      ry = ($urandom_range(200000) - 100000.0) / 50000.0;
      d = r2f(rd); y = r2f(ry); rd = f2r(d); ry = f2r(y);
      in_valid = 1'b1;
      @(posedge clk); #1 in_valid = 1'b0;
      d = r2f(7.0); y = r2f(1.0);   // must not be taken without in_valid
      checks++;
      if (!e_valid || fabs(f2r(e) - (rd - ry)) > 2.0 ** -21 * (fabs(rd) + fabs(ry))) begin
        failures++;
        if (failures < 10) $display("FAIL %g - %g got %g (valid %b)", rd, ry, f2r(e), e_valid);
      end
      @(posedge clk); #1;
      checks++;
      if (e_valid || fabs(f2r(e) - (rd - ry)) > 2.0 ** -21 * (fabs(rd) + fabs(ry))) begin
        failures++;
        $display("FAIL e changed or e_valid held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
