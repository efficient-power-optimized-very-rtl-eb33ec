// tb_serial_adder: streams of random FP32 values (lengths 1..40, random
// gaps) are summed; the result must appear one clock after the last value
// with the stream's tag and match the real sum within 1e-6 of sum |v|.
module tb_serial_adder;
  import plms_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  sw_phase_e in_tag;
  fp32_t     in_data, sum;
  logic      sum_valid;
  sw_phase_e sum_tag;
  int checks = 0, failures = 0;

  serial_adder dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_tag, .in_data,
                    .sum, .sum_valid, .sum_tag);

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
    real ref_sum, mag, v;
    int  len;
    in_tag = SW_TAPOUT; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      len = 1 + int'($urandom_range(39));
      in_tag = sw_phase_e'($urandom_range(1));
      ref_sum = 0.0; mag = 0.0;
      for (int i = 0; i < len; i++) begin
        v = ($urandom_range(200000) - 100000.0) / 3000.0;
        in_data  = r2f(v);
        v        = f2r(in_data);
        ref_sum += v;
        mag     += fabs(v);
        in_valid = 1'b1; in_first = (i == 0); in_last = (i == len - 1);
        @(posedge clk); #1;
        in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
        checks++;
        if (sum_valid !== (i == len - 1)) begin
          failures++;
          $display("FAIL sum_valid timing in stream %0d", s);
        end
        // a random gap must not disturb the accumulation
        if ($urandom_range(3) == 0 && i != len - 1) begin
          @(posedge clk); #1;
        end
      end
      checks++;
      if (fabs(f2r(sum) - ref_sum) > 1e-6 * mag || sum_tag !== in_tag) begin
        failures++;
        if (failures < 10) $display("FAIL sum %g expected %g", f2r(sum), ref_sum);
      end
      @(posedge clk); #1;
      checks++;
      if (sum_valid) begin failures++; $display("FAIL sum_valid longer than a cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
