// tb_pwm: for several levels, counts the released clocks over one 256-clock ramp period and
// compares with the number of ramp values k*256 below the level, i.e. ceil(level/256).
// Also checks that the output pattern repeats every 256 clocks.
module tb_pwm;
  logic clk = 0, rst = 1;
  logic [15:0] level;
  logic rel;
  int checks = 0, failures = 0;

  pwm dut (.clk, .rst, .level_in(level), .pwm_release(rel));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int levels [8] = '{0, 1, 255, 256, 257, 32768, 65280, 65535};
    level = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (levels[n]) begin
      int cnt, cnt2, exp;
      level = 16'(levels[n]);
      repeat (300) @(posedge clk);
      cnt = 0; cnt2 = 0;
      for (int c = 0; c < 256; c++) begin @(posedge clk); #1; cnt += int'(rel); end
      for (int c = 0; c < 256; c++) begin @(posedge clk); #1; cnt2 += int'(rel); end
      exp = (levels[n] + 255) / 256;
      checks++;
      if (cnt != exp) begin
        failures++;
        $display("FAIL level %0d: %0d released clocks, expected %0d", levels[n], cnt, exp);
      end
      checks++;
      if (cnt2 != cnt) begin
        failures++;
        $display("FAIL level %0d: period not 256 clocks", levels[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
