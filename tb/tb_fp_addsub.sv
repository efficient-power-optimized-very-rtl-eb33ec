// tb_fp_addsub: the FP adder/subtractor against real arithmetic.
// Directed cases are exact; random operands (both signs, exponent
// differences from 0 to beyond the mantissa width, add and subtract) must
// be within 2^-21 of the larger operand's magnitude (truncating adder).
module tb_fp_addsub;
  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_addsub dut (.a, .b, .sub, .y);

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

  task automatic exact(input logic [31:0] x, input logic [31:0] z, input logic s,
                       input logic [31:0] expect_y);
    a = x; b = z; sub = s;
    @(posedge clk);
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL %h %s %h = %h, got %h", x, s ? "-" : "+", z, expect_y, y);
    end
  endtask

  task automatic approx(input logic [31:0] x, input logic [31:0] z, input logic s);
    real ra, rb, r, got, tol;
    a = x; b = z; sub = s;
    @(posedge clk);
    ra  = f2r((x));
    rb  = f2r((z));
    r   = s ? ra - rb : ra + rb;
    got = f2r((y));
    tol = ((ra < 0 ? -ra : ra) > (rb < 0 ? -rb : rb) ? (ra < 0 ? -ra : ra)
                                                     : (rb < 0 ? -rb : rb)) * (2.0 ** -21);
    checks++;
    if ((got - r > tol) || (r - got > tol)) begin
      failures++;
      if (failures < 10) $display("FAIL %g %s %g = %g, got %g", ra, s ? "-" : "+", rb, r, got);
    end
  endtask

  initial begin
    exact(32'h3FC0_0000, 32'h4010_0000, 1'b0, 32'h4070_0000);  // 1.5 + 2.25 = 3.75
    exact(32'h3F80_0000, 32'h3F80_0000, 1'b1, 32'h0000_0000);  // 1 - 1 = 0
    exact(32'h4000_0000, 32'h3F80_0000, 1'b1, 32'h3F80_0000);  // 2 - 1 = 1
    exact(32'h3F80_0000, 32'h4000_0000, 1'b1, 32'hBF80_0000);  // 1 - 2 = -1
    exact(32'hC0A0_0000, 32'h4040_0000, 1'b0, 32'hC000_0000);  // -5 + 3 = -2
    exact(32'h0000_0000, 32'h4049_0FDB, 1'b0, 32'h4049_0FDB);  // 0 + pi
    exact(32'h4049_0FDB, 32'h0000_0000, 1'b1, 32'h4049_0FDB);  // pi - 0
    exact(32'h3F80_0000, 32'h3380_0000, 1'b0, 32'h3F80_0000);  // 1 + 2^-24 truncates
    exact(32'h7F00_0000, 32'h7F00_0000, 1'b0, 32'h7F80_0000);  // overflow -> Inf
    for (int i = 0; i < 8000; i++) approx(rnd_fp(110, 140), rnd_fp(110, 140), 1'($urandom));
    for (int i = 0; i < 4000; i++) approx(rnd_fp(125, 128), rnd_fp(125, 128), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
