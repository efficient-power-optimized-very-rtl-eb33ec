// tb_fp_div: the approximate FP divider. Random quotients must be within
// 7.3 % of the exact quotient (linear reciprocal seed), and the error must
// also reach at least 5 % somewhere, showing the seed really is the
// designed minimax line. Directed cases check sign, exponent and zeros.
module tb_fp_div;
  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  real worst = 0.0;

  fp_div dut (.a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // IEEE-754 single precision word to real (subnormals read as zero)
  function automatic real f2r(input logic [31:0] v);
    logic [10:0] e11;
    if (v[30:23] == 8'd0) return 0.0;
    e11 = 11'(v[30:23]) + 11'd896;      // rebias 127 -> 1023
    return $bitstoreal({v[31], e11, v[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] rnd_fp(input int emin, input int emax);
    int e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  task automatic approx(input logic [31:0] x, input logic [31:0] z);
    real r, got, rel;
    a = x; b = z;
    @(posedge clk);
    r   = f2r((x)) / f2r((z));
    got = f2r((y));
    rel = (got - r) / r;
    if (rel < 0) rel = -rel;
    if (rel > worst) worst = rel;
    checks++;
    if (rel > 0.073 || (y[31] != (x[31] ^ z[31]))) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h = %g, got %g", x, z, r, got);
    end
  endtask

  task automatic exact(input logic [31:0] x, input logic [31:0] z, input logic [31:0] expect_y);
    a = x; b = z;
    @(posedge clk);
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL %h / %h expected %h, got %h", x, z, expect_y, y);
    end
  endtask

  initial begin
    exact(32'h0000_0000, 32'h4000_0000, 32'h0000_0000);  // 0 / 2 = 0
    exact(32'h4000_0000, 32'h0000_0000, 32'h7F80_0000);  // 2 / 0 = Inf
    approx(32'h4040_0000, 32'h3F80_0000);                // 3 / 1
    approx(32'hC0E0_0000, 32'h4000_0000);                // -7 / 2
    approx(32'h3F80_0000, 32'h3FFF_FFFF);                // 1 / (2-ulp)
    for (int i = 0; i < 12000; i++) approx(rnd_fp(100, 150), rnd_fp(100, 150));
    checks++;
    if (worst < 0.05) begin
      failures++;
      $display("FAIL worst relative error %g is not the designed seed error", worst);
    end
    $display("worst relative error %g", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
