// tb_vga_display: scans two full screens through the display block, once showing the masks
// and once the raw camera image. The testbench plays the frame buffers and the label ROM,
// answering each address with a pattern two clocks later, captures the colour that appears
// three clocks after each position, and compares every visible pixel with the screen layout
// written out in the testbench: masks, crosshairs for detected blobs only, yellow dividers,
// label rows and bar graphs. hsync and vsync must come out delayed by the same three clocks.
module tb_vga_display;
  import spacesynth_pkg::*;

  logic clk = 0, rst = 1;
  logic [10:0] hc;
  logic [9:0] vc;
  logic hs, vs, bl, raw;
  blob_t red, green, blue;
  logic [16:0] ra, ga, ba, wa;
  logic [17:0] la;
  logic [11:0] rb, gb, bb, wb, lp;
  logic [3:0] r, g, b;
  logic ohs, ovs;
  int checks = 0, failures = 0;

  vga_display dut (.clk, .rst, .hcount(hc), .vcount(vc), .hsync_in(hs), .vsync_in(vs),
                   .blank_in(bl), .show_raw(raw), .red_blob(red), .green_blob(green),
                   .blue_blob(blue), .red_addr(ra), .green_addr(ga), .blue_addr(ba), .raw_addr(wa),
                   .label_addr(la), .red_buff(rb), .green_buff(gb), .blue_buff(bb), .raw_buff(wb),
                   .label_pixel(lp), .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(ohs), .vga_vs(ovs));

  always #5 clk = !clk;

  // buffer and ROM models, two clocks of latency
  function automatic logic [11:0] red_pat(logic [16:0] a);   return (a % 7 == 0) ? 12'hF00 : 12'h000; endfunction
  function automatic logic [11:0] green_pat(logic [16:0] a); return (a % 5 == 0) ? 12'h0F0 : 12'h000; endfunction
  function automatic logic [11:0] blue_pat(logic [16:0] a);  return (a % 3 == 0) ? 12'h00F : 12'h000; endfunction
  function automatic logic [11:0] raw_pat(logic [16:0] a);   return a[11:0]; endfunction
  function automatic logic [11:0] lab_pat(logic [17:0] a);   return a[11:0] ^ 12'hABC; endfunction

  logic [11:0] rb1, gb1, bb1, wb1, lp1;
  always @(posedge clk) begin
    rb1 <= red_pat(ra);  rb <= rb1;
    gb1 <= green_pat(ga); gb <= gb1;
    bb1 <= blue_pat(ba); bb <= bb1;
    wb1 <= raw_pat(wa);  wb <= wb1;
    lp1 <= lab_pat(la);  lp <= lp1;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] expected(int x, int y, bit show_raw);
    int bx [9] = '{96, 192, 288, 416, 512, 608, 736, 832, 928};
    int val [9], rng [9];
    logic [11:0] col [9];
    val = '{red.v, red.h, red.area / 256, blue.v, blue.h, blue.area / 256,
            green.v, green.h, green.area / 256};
    rng = '{240, 320, 300, 240, 320, 300, 240, 320, 300};
    col = '{12'hF00, 12'hF00, 12'hF00, 12'h00F, 12'h00F, 12'h00F, 12'h0F0, 12'h0F0, 12'h0F0};
    if (y < 240) begin
      int a;
      if (x < 320) begin
        a = y * 320 + x;
        if (show_raw) return raw_pat(17'(a));
        if (red.area >= 200 && (x == red.h || y == red.v)) return 12'hF0F;
        return red_pat(17'(a));
      end
      if (x < 640) begin
        a = y * 320 + x - 320;
        if (show_raw) return 0;
        if (x == 400 || x == 480 || x == 560) return 12'hFF0;
        if (blue.area >= 200 && (x - 320 == blue.h || y == blue.v)) return 12'hF0F;
        return blue_pat(17'(a));
      end
      if (x < 960) begin
        a = y * 320 + x - 640;
        if (show_raw) return 0;
        if (green.area >= 200 && (x - 640 == green.h || y == green.v)) return 12'hF0F;
        return green_pat(17'(a));
      end
      return 0;
    end
    if (y < 430) return lab_pat(18'((y - 240) * 1024 + x));
    for (int i = 0; i < 9; i++)
      if (x >= bx[i] && x < bx[i] + 12 && 767 - y <= rng[i]) begin
        if (x == bx[i] || x == bx[i] + 11 || 767 - y == rng[i]) return 12'hFFF;
        if (767 - y < val[i]) return col[i];
        return 0;
      end
    return 0;
  endfunction

  initial begin
    int hist_h [$], hist_v [$];
    logic hs_q [$], vs_q [$], bl_q [$];
    red   = '{h: 9'd100, v: 8'd50,  area: 17'd500};
    blue  = '{h: 9'd200, v: 8'd120, area: 17'd100};
    green = '{h: 9'd30,  v: 8'd200, area: 17'd76800};
    hc = 0; vc = 0; hs = 1; vs = 1; bl = 0; raw = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int frame = 0; frame < 2; frame++) begin
      raw = (frame == 1);
      for (int y = 0; y < 806; y++)
        for (int x = 0; x < 1344; x++) begin
          @(negedge clk);
          hc = 11'(x); vc = 10'(y);
          bl = (x >= 1024 || y >= 768);
          hs = !(x >= 1048 && x < 1184);
          vs = !(y >= 771 && y < 777);
          hist_h.push_back(x); hist_v.push_back(y);
          hs_q.push_back(hs); vs_q.push_back(vs); bl_q.push_back(bl);
          if (hist_h.size() > 3) begin
            int px, py;
            logic eb;
            logic [11:0] e;
            px = hist_h.pop_front(); py = hist_v.pop_front();
            eb = bl_q.pop_front();
            e = eb ? 12'h000 : expected(px, py, raw);
            checks++;
            if ({r, g, b} != e || ohs != hs_q.pop_front() || ovs != vs_q.pop_front()) begin
              failures++;
              if (failures < 10) $display("FAIL (%0d,%0d) raw=%0d: %h expected %h", px, py, raw, {r, g, b}, e);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
