// tb_thresholding: checks the colour decision for known LED colours and for random HSV values
// under every threshold setting, against the hue windows and minimums listed in the testbench.
// Combinational block, read 1 ns after each input. The window values themselves are this
// design's choice; the description gives only the switch-selectable settings.
module tb_thresholding;
  logic [7:0] h, s, v;
  logic [3:0] sel;
  logic r, g, b;
  int checks = 0, failures = 0;

  thresholding dut (.h_in(h), .s_in(s), .v_in(v), .setting_in(sel), .red_out(r), .green_out(g),
                    .blue_out(b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int smin [5] = '{80, 60, 100, 120, 140};
    int vmin [5] = '{96, 64, 128, 160, 192};
    for (int n = 0; n < 5000; n++) begin
      int k;
      bit bright, er, eg, eb;
      h = 8'($urandom); s = 8'($urandom); v = 8'($urandom); sel = 4'($urandom);
      #1;
      k = sel[3] ? 4 : sel[2] ? 3 : sel[1] ? 2 : sel[0] ? 1 : 0;
      bright = (s >= smin[k]) && (v >= vmin[k]);
      er = bright && (h >= 235 || h <= 10);
      eg = bright && (h >= 64 && h <= 120);
      eb = bright && (h >= 145 && h <= 190);
      checks++;
      if ({r, g, b} != {er, eg, eb}) begin
        failures++;
        if (failures < 10) $display("FAIL h=%0d s=%0d v=%0d sel=%b: %b%b%b", h, s, v, sel, r, g, b);
      end
    end
    // saturated LEDs at full brightness
    sel = 0; s = 255; v = 248;
    h = 0;   #1; checks++; if ({r, g, b} != 3'b100) failures++;
    h = 85;  #1; checks++; if ({r, g, b} != 3'b010) failures++;
    h = 171; #1; checks++; if ({r, g, b} != 3'b001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
