// tb_waveshape_selector: moves the blue blob across the four 80-pixel regions and checks the
// selected osc_1 shape, that the shape is held while the blob is too small, and that osc_2
// follows its switches.
module tb_waveshape_selector;
  import spacesynth_pkg::*;

  logic clk = 0, rst = 1;
  blob_t blue;
  logic [1:0] sw;
  wave_t o1, o2;
  int checks = 0, failures = 0;

  waveshape_selector dut (.clk, .rst, .blue_blob(blue), .osc2_shape_sw(sw), .osc1_shape(o1),
                          .osc2_shape(o2));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held;
    blue = '0; sw = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    held = 0;
    for (int n = 0; n < 1000; n++) begin
      int h, area, prev;
      prev = int'(o1);
      h = $urandom_range(0, 319);
      area = ($urandom_range(0, 2) == 0) ? $urandom_range(0, 199) : $urandom_range(200, 5000);
      blue.h = 9'(h); blue.v = 8'($urandom); blue.area = 17'(area);
      sw = 2'($urandom);
      @(posedge clk); #1;
      checks++;
      if (int'(o1) != ((area >= 200) ? h / 80 : prev)) begin
        failures++;
        $display("FAIL h=%0d area=%0d: osc1 shape %0d", h, area, o1);
      end
      if (area < 200) held++;
      checks++;
      if (o2 != wave_t'(sw)) begin failures++; $display("FAIL osc2 shape %0d, sw %0d", o2, sw); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
