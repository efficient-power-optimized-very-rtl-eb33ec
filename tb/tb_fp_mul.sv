// tb_fp_mul: the FP multiplier against real arithmetic. Directed cases are
// exact; random products must be within 2^-22 relative (truncation).
module tb_fp_mul;
  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

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

  task automatic exact(input logic [31:0] x, input logic [31:0] z, input logic [31:0] expect_y);
    a = x; b = z;
    @(posedge clk);
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL %h * %h = %h, got %h", x, z, expect_y, y);
    end
  endtask

  task automatic approx(input logic [31:0] x, input logic [31:0] z);
    real r, got, tol;
    a = x; b = z;
    @(posedge clk);
    r   = f2r((x)) * f2r((z));
    got = f2r((y));
    tol = (r < 0 ? -r : r) * (2.0 ** -22);
    checks++;
    if ((got - r > tol) || (r - got > tol)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %g, got %g", x, z, r, got);
    end
  endtask

  initial begin
    exact(32'h3FC0_0000, 32'h4010_0000, 32'h4058_0000);  // 1.5 * 2.25 = 3.375
    exact(32'h3FC0_0000, 32'hBFC0_0000, 32'hC010_0000);  // 1.5 * -1.5 = -2.25
    exact(32'h3F80_0000, 32'h4049_0FDB, 32'h4049_0FDB);  // 1 * pi
    exact(32'h0000_0000, 32'h4049_0FDB, 32'h0000_0000);  // 0 * pi
    exact(32'h3FFF_FFFF, 32'h3FFF_FFFF, 32'h407F_FFFE);  // (2-2^-23)^2, truncated
    exact(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);  // overflow -> Inf
    exact(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);  // underflow -> 0
    for (int i = 0; i < 12000; i++) approx(rnd_fp(90, 160), rnd_fp(90, 160));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
