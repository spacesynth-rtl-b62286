// tb_control_mapper: drives random blob measurements and LFO values and checks every output
// against the mapping rules written out in the testbench: pitch 200 + h (+ LFO, clipped at 0
// and 4095), 0 Hz for an undetected hand, volume v/16, cutoff = |red h - green h| saturated,
// LFO rate area/4096, LFO depth 15 - min(area/512, 10), and holding of the other controls
// while a blob is below 200 pixels. Counts how often the clip to 0 Hz and the hold happened.
module tb_control_mapper;
  import spacesynth_pkg::*;

  logic clk = 0, rst = 1;
  blob_t red, green;
  logic signed [15:0] lfo;
  logic lfo_en;
  logic [11:0] f1, f2, lf;
  logic [3:0] a1, a2, la;
  logic [7:0] cut;
  int checks = 0, failures = 0;

  control_mapper dut (.clk, .rst, .red_blob(red), .green_blob(green), .lfo_in(lfo),
                      .lfo_enable(lfo_en), .synth1_freq(f1), .synth2_freq(f2), .synth1_amp(a1),
                      .synth2_amp(a2), .filter_cutoff(cut), .lfo_freq(lf), .lfo_atten(la));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  function automatic int pitch(int h, int l, bit en);
    int s;
    s = 200 + h + (en ? l : 0);
    return (s < 0) ? 0 : (s > 4095) ? 4095 : s;
  endfunction

  initial begin
    int e_a1, e_a2, e_cut, e_lf, e_la, clips, holds;
    red = '0; green = '0; lfo = 0; lfo_en = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    e_a1 = 15; e_a2 = 15; e_cut = 255; e_lf = 0; e_la = 15;
    clips = 0; holds = 0;
    for (int n = 0; n < 2000; n++) begin
      bit rd, gd;
      int l;
      red.h = 9'($urandom_range(0, 319));   red.v = 8'($urandom_range(0, 239));
      green.h = 9'($urandom_range(0, 319)); green.v = 8'($urandom_range(0, 239));
      red.area   = 17'(($urandom_range(0, 3) == 0) ? $urandom_range(0, 199) : $urandom_range(200, 76800));
      green.area = 17'(($urandom_range(0, 3) == 0) ? $urandom_range(0, 199) : $urandom_range(200, 76800));
      l = ($urandom_range(0, 1) == 1) ? $urandom_range(0, 2048) - 1024 : int'($signed(16'($urandom)));
      lfo = 16'(l);
      lfo_en = 1'($urandom);
      @(posedge clk); #1;
      rd = red.area >= 200;
      gd = green.area >= 200;
      if (rd) begin e_a1 = red.v / 16; e_lf = red.area / 4096; end
      if (gd) begin e_a2 = green.v / 16; e_la = 15 - ((green.area / 512 > 10) ? 10 : green.area / 512); end
      if (rd && gd) begin
        int d;
        d = (red.h > green.h) ? red.h - green.h : green.h - red.h;
        e_cut = (d > 255) ? 255 : d;
      end else holds++;
      if (rd && lfo_en && 200 + int'(red.h) + l < 0) clips++;
      expect_eq("synth1_freq", f1, rd ? pitch(red.h, l, lfo_en) : 0);
      expect_eq("synth2_freq", f2, gd ? pitch(green.h, l, lfo_en) : 0);
      expect_eq("synth1_amp", a1, e_a1);
      expect_eq("synth2_amp", a2, e_a2);
      expect_eq("cutoff", cut, e_cut);
      expect_eq("lfo_freq", lf, e_lf);
      expect_eq("lfo_atten", la, e_la);
    end
    checks++;
    if (clips == 0 || holds == 0) begin
      failures++;
      $display("FAIL clip happened %0d times, hold %0d times", clips, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
