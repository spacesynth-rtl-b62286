// tb_sample_trigger: checks that the strobe is one clock wide and comes every 1354 clocks
// (65 MHz / 48 kHz rounded) at the default parameters.
// Watches about ten periods after reset. The 48 kHz rate and 65 MHz clock are the
// description's; the rounding of the period is this design's.
module tb_sample_trigger;
  logic clk = 0, rst = 1, trig;
  int checks = 0, failures = 0;

  sample_trigger dut (.clk, .rst, .trigger_out(trig));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, now, cyc;
    repeat (3) @(posedge clk);
    rst = 0;
    cyc = 0; last = -1;
    while (checks < 10) begin
      @(posedge clk); #1;
      cyc++;
      if (trig) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 1354) begin
            failures++;
            $display("FAIL strobe period %0d, expected 1354", cyc - last);
          end
        end
        last = cyc;
        @(posedge clk); #1;
        cyc++;
        checks++;
        if (trig) begin failures++; $display("FAIL strobe wider than one clock"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
