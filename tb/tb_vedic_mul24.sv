// tb_vedic_mul24: random and corner operands of the 24x24 Vedic mantissa
// multiplier compared with the 48-bit integer product.
module tb_vedic_mul24;
  logic        clk = 1'b0;
  logic [23:0] a, b;
  logic [47:0] p;
  int checks = 0, failures = 0;

  vedic_mul24 dut (.a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [23:0] x, input logic [23:0] y);
    logic [47:0] ref_p;
    a = x;
    b = y;
    @(posedge clk);
    ref_p = 48'(x) * 48'(y);
    checks++;
    if (p !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h = %h, got %h", x, y, ref_p, p);
    end
  endtask

  initial begin
    check(24'hFFFFFF, 24'hFFFFFF);
    check(24'h000000, 24'hFFFFFF);
    check(24'h800000, 24'h800000);
    check(24'h000001, 24'hABCDEF);
    for (int i = 0; i < 20000; i++) check(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
