// tb_xvga: runs a little over one frame and checks, every clock, that hcount/vcount step
// through 1344 x 806 positions, that blank is high exactly outside 1024 x 768, and that hsync
// and vsync are low exactly in their VESA windows (hcount 1048..1183, vcount 771..776).
module tb_xvga;
  logic clk = 0, rst = 1;
  logic [10:0] hc;
  logic [9:0] vc;
  logic hs, vs, bl;
  int checks = 0, failures = 0;

  xvga dut (.clk, .rst, .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs), .blank(bl));

  always #5 clk = !clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, ev, frames_seen;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    eh = int'(hc); ev = int'(vc);
    frames_seen = 0;
    for (int n = 0; n < 1344 * 806 + 5000; n++) begin
      @(posedge clk); #1;
      eh++;
      if (eh == 1344) begin eh = 0; ev++; if (ev == 806) begin ev = 0; frames_seen++; end end
      checks++;
      if (int'(hc) != eh || int'(vc) != ev ||
          bl != (eh >= 1024 || ev >= 768) ||
          hs != !(eh >= 1048 && eh < 1184) ||
          vs != !(ev >= 771 && ev < 777)) begin
        failures++;
        if (failures < 10) $display("FAIL at (%0d,%0d): hc %0d vc %0d hs %b vs %b blank %b", eh, ev, hc, vc, hs, vs, bl);
      end
    end
    checks++;
    if (frames_seen != 1) begin failures++; $display("FAIL frame count %0d", frames_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
