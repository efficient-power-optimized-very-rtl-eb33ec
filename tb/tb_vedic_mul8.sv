// tb_vedic_mul8: exhaustive check of the 8x8 Vedic multiplier against the
// integer product, all 65536 operand pairs, one pair per clock.
module tb_vedic_mul8;
  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  vedic_mul8 dut (.a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        @(posedge clk);
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
