// tb_top_level: end-to-end test of SpaceSynth at its default (full) size.
//
// A behavioural camera (cam_model, 320 x 240 RGB565, clocked by the design's xclk) shows a
// red, a green and a blue square; the testbench moves them and the switches through five
// scenes, waits three camera frames in each, and checks the whole chain: tracked blobs,
// control mapping, waveshape selection, audio activity on the PWM pin, and the VGA picture,
// which is captured into a screen array from the colour outputs (three clocks behind the
// scan counters) while a label ROM model answers addresses two clocks later.
// Every mechanism below is counted when it is seen working; any mechanism never seen counts
// as a failure at the end:
//   TRACK   blob centres and areas follow the squares
//   PITCH   synth frequency = 200 + horizontal centre, amplitude = vertical centre / 16
//   CUTOFF  filter cutoff follows the distance between the red and green squares, and changes
//   SHAPE   osc_1 shape follows the blue square's region and changes; osc_2 follows sw[4:3]
//   XHAIR   magenta crosshairs on the detected blobs, yellow dividers on the blue mask
//   LABEL   label ROM rows and bar graphs on the lower screen
//   RAW     sw[2] shows the raw camera picture
//   LOST    a hidden red square gives frequency 0 while other controls hold
//   SILENT  with both hands hidden the audio stops moving
//   LFO     sw[14] modulates the pitch, and a deep LFO clips the pitch at 0 Hz
//   PWM     the audio pin toggles with a duty cycle that varies
//   SYNC    806 hsync pulses per vsync period
//   OCTAVE  sw[13:11] moves osc_2 of both voices up or down by octaves
// Probes inside the design (dut.*) are used to read the controls and the audio sample.
module tb_top_level;
  import spacesynth_pkg::*;

  logic        clk = 0, rst = 1;
  logic [15:0] sw;
  logic        xclk, pclk, vsync, href;
  logic [7:0]  data;
  logic [17:0] label_addr;
  logic [11:0] label_pixel;
  logic [3:0]  r, g, b;
  logic        hs, vs, pwm_rel;
  int red_x, red_y, red_size, green_x, green_y, green_size, blue_x, blue_y, blue_size;
  int frame_count;
  int checks = 0, failures = 0;

  typedef enum int {TRACK, PITCH, CUTOFF, SHAPE, XHAIR, LABEL, RAW, LOST, SILENT, LFO, PWM,
                    SYNC, OCTAVE, N_MECH} mech_t;
  int seen [N_MECH];

  top_level dut (
    .clk_65mhz(clk), .rst, .sw, .cam_xclk(xclk), .cam_pclk(pclk), .cam_vsync(vsync),
    .cam_href(href), .cam_data(data), .label_rom_addr(label_addr), .label_rom_pixel(label_pixel),
    .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs), .aud_pwm_release(pwm_rel)
  );

  cam_model cam (
    .xclk, .pclk, .vsync, .href, .data, .red_x, .red_y, .red_size, .green_x, .green_y,
    .green_size, .blue_x, .blue_y, .blue_size, .frame_count
  );

  always #5 clk = !clk;

  // label ROM model: two clocks of latency
  function automatic logic [11:0] lab_pat(logic [17:0] a); return a[11:0] ^ 12'hABC; endfunction
  logic [11:0] lp1;
  always @(posedge clk) begin lp1 <= lab_pat(label_addr); label_pixel <= lp1; end

  // screen capture: the colour on the pins belongs to the scan position of three clocks ago
  logic [11:0] screen [768][1024];
  logic [10:0] h1, h2, h3;
  logic [9:0]  v1, v2, v3;
  always @(negedge clk) begin
    if (h3 < 1024 && v3 < 768) screen[v3][h3] = {r, g, b};
    h3 = h2; v3 = v2; h2 = h1; v2 = v1; h1 = dut.hcount; v1 = dut.vcount;
  end

  // sync count: hsync pulses between vsync pulses
  int hs_count = 0, vs_periods = 0;
  logic hs_d = 1, vs_d = 1;
  always @(posedge clk) if (!rst) begin
    hs_d <= hs; vs_d <= vs;
    if (hs_d && !hs) hs_count <= hs_count + 1;
    if (vs_d && !vs) begin
      if (vs_periods > 0) begin
        checks++;
        if (hs_count == 806) seen[SYNC]++;
        else begin failures++; $display("FAIL %0d hsync pulses per frame", hs_count); end
      end
      vs_periods <= vs_periods + 1;
      hs_count <= 0;
    end
  end

  // PWM: toggles and duty per audio sample
  int pwm_high = 0, pwm_toggles = 0, duty_min = 1 << 30, duty_max = 0;
  logic pwm_d = 0;
  always @(posedge clk) if (!rst) begin
    pwm_d <= pwm_rel;
    if (pwm_d != pwm_rel) pwm_toggles <= pwm_toggles + 1;
    if (dut.sample_tick) begin
      if (pwm_high < duty_min) duty_min <= pwm_high;
      if (pwm_high > duty_max) duty_max <= pwm_high;
      pwm_high <= 0;
    end else if (pwm_rel) pwm_high <= pwm_high + 1;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(mech_t m, bit ok, string what);
    checks++;
    if (ok) seen[m]++;
    else begin failures++; $display("FAIL %s: %s", m.name(), what); end
  endtask

  task automatic wait_frames(int n);
    int f0 = frame_count;
    while (frame_count < f0 + n) @(posedge clk);
    repeat (2000) @(posedge clk);
  endtask

  task automatic wait_vga_frames(int n);
    int p0 = vs_periods;
    while (vs_periods < p0 + n) @(posedge clk);
  endtask

  function automatic bit near(int a, int e); return a >= e - 1 && a <= e + 1; endfunction

  task automatic check_blob(string name, blob_t bl, int x, int y, int s);
    check(TRACK, near(bl.h, x + (s - 1) / 2) && near(bl.v, y + (s - 1) / 2) &&
          bl.area >= s * s - 2 && bl.area <= s * s,
          $sformatf("%s blob h %0d v %0d area %0d for square at (%0d,%0d) size %0d",
                    name, bl.h, bl.v, bl.area, x, y, s));
  endtask

  task automatic check_pixel(mech_t m, int x, int y, logic [11:0] e);
    check(m, screen[y][x] == e, $sformatf("pixel (%0d,%0d) = %h, expected %h", x, y, screen[y][x], e));
  endtask

  initial begin
    blob_t rb, gb, bb;
    int f_min, f_max, cut_a, sample_count;
    bit moved, clipped;
    logic signed [15:0] a0;

    sw = 16'b0000_0000_0000_1000;               // osc_2 square, LFO off, mask view
    red_x = 40;   red_y = 60;   red_size = 40;
    green_x = 200; green_y = 20; green_size = 30;
    blue_x = 250; blue_y = 150; blue_size = 30;
    repeat (10) @(posedge clk);
    rst = 0;

    // ---- scene A: three squares, LFO off
    wait_frames(3);
    rb = dut.red_blob; gb = dut.green_blob; bb = dut.blue_blob;
    check_blob("red", rb, red_x, red_y, red_size);
    check_blob("green", gb, green_x, green_y, green_size);
    check_blob("blue", bb, blue_x, blue_y, blue_size);
    check(PITCH, dut.synth1_freq == 200 + rb.h && dut.synth2_freq == 200 + gb.h,
          $sformatf("freqs %0d %0d for h %0d %0d", dut.synth1_freq, dut.synth2_freq, rb.h, gb.h));
    check(PITCH, dut.synth1_amp == rb.v[7:4] && dut.synth2_amp == gb.v[7:4], "amplitudes");
    cut_a = gb.h - rb.h;
    check(CUTOFF, dut.cutoff == cut_a, $sformatf("cutoff %0d expected %0d", dut.cutoff, cut_a));
    check(SHAPE, dut.osc1_shape == wave_t'(bb.h / 80), $sformatf("osc1 shape %0d", dut.osc1_shape));
    check(SHAPE, dut.osc2_shape == WAVE_SQUARE, "osc2 shape from switches");
    sw[13:11] = 3'd1;                                       // one octave up
    repeat (2) @(posedge clk); #1;
    check(OCTAVE, dut.u_synth1.osc2_freq == 12'(dut.synth1_freq << 1) &&
          dut.u_synth2.osc2_freq == 12'(dut.synth2_freq << 1), "osc2 one octave up");
    sw[13:11] = 3'b110;                                     // two octaves down
    repeat (2) @(posedge clk); #1;
    check(OCTAVE, dut.u_synth1.osc2_freq == (dut.synth1_freq >> 2) &&
          dut.u_synth2.osc2_freq == (dut.synth2_freq >> 2), "osc2 two octaves down");
    sw[13:11] = 3'd0;
    wait_vga_frames(2);
    check_pixel(XHAIR, rb.h, 10, 12'hF0F);                 // red vertical line
    check_pixel(XHAIR, 5, rb.v, 12'hF0F);                  // red horizontal line
    check_pixel(XHAIR, 320 + bb.h, 10, 12'hF0F);           // blue crosshair
    check_pixel(XHAIR, 640 + gb.h, 200, 12'hF0F);          // green crosshair
    check_pixel(XHAIR, 400, 200, 12'hFF0);                 // blue region divider
    check_pixel(XHAIR, 45, 65, 12'hF00);                   // inside the red mask
    check_pixel(XHAIR, 10, 200, 12'h000);                  // background
    check_pixel(LABEL, 500, 300, lab_pat(18'((300 - 240) * 1024 + 500)));
    check_pixel(LABEL, 197, 767 - (rb.h - 1), 12'hF00);    // top of red horizontal bar
    check_pixel(LABEL, 197, 767 - (rb.h + 1), 12'h000);

    // ---- scene B: blue moved to region 0, green closer, raw view
    blue_x = 10; blue_y = 180;
    green_x = 150;
    sw[2] = 1;
    wait_frames(3);
    rb = dut.red_blob; gb = dut.green_blob; bb = dut.blue_blob;
    check_blob("blue", bb, blue_x, blue_y, blue_size);
    check_blob("green", gb, green_x, green_y, green_size);
    check(SHAPE, dut.osc1_shape == WAVE_SINE, "osc1 shape after blue moved to region 0");
    check(CUTOFF, dut.cutoff == gb.h - rb.h && dut.cutoff != cut_a,
          $sformatf("cutoff %0d after move", dut.cutoff));
    wait_vga_frames(2);
    check_pixel(RAW, 45, 65, 12'hF00);                     // red square, raw colour
    check_pixel(RAW, 5, 5, 12'h222);                       // background, raw colour
    check_pixel(RAW, 20, 190, 12'h00F);                    // blue square, raw colour
    check_pixel(RAW, 700, 10, 12'h000);                    // other masks hidden

    // ---- scene C: red hand hidden
    red_size = 0;
    sw[2] = 0;
    wait_frames(3);
    check(LOST, dut.red_blob.area < 200 && dut.synth1_freq == 0, "synth 1 not silenced");
    check(LOST, dut.synth1_amp == rb.v[7:4] && dut.synth2_freq == 200 + dut.green_blob.h,
          "other controls not held");

    // ---- scene D: both hands hidden: the oscillators stop and the output settles
    green_size = 0;
    wait_frames(3);
    a0 = dut.audio;
    moved = 0;
    for (int i = 0; i < 200; i++) begin
      @(posedge dut.sample_tick);
      if (dut.audio != a0) moved = 1;
    end
    check(SILENT, dut.synth1_freq == 0 && dut.synth2_freq == 0 && !moved, "audio still moving");

    // ---- scene E: big red and green squares, LFO on with a sawtooth
    sw[14] = 1; sw[1:0] = 2'(WAVE_SAW);
    red_x = 0;  red_y = 0;  red_size = 180;
    green_x = 200; green_y = 0; green_size = 80;
    blue_x = 200; blue_y = 150; blue_size = 40;
    f_min = 4096; f_max = 0; clipped = 0;
    wait_frames(2);
    check(LFO, dut.lfo_freq == dut.red_blob.area >> 12 && dut.lfo_atten == 5,
          $sformatf("LFO controls %0d %0d", dut.lfo_freq, dut.lfo_atten));
    check(SHAPE, dut.osc1_shape == WAVE_TRIANGLE, "osc1 shape in region 2");
    sample_count = 0;
    repeat (20000) begin
      @(posedge dut.sample_tick);
      repeat (3) @(posedge clk);
      #1;
      if (dut.synth1_freq < f_min) f_min = dut.synth1_freq;
      if (dut.synth1_freq > f_max) f_max = dut.synth1_freq;
      if (dut.synth1_freq == 0 && dut.red_blob.area >= 200) clipped = 1;
      if (int'(dut.synth1_freq) == 200 + int'(dut.red_blob.h) + int'(dut.lfo_out) ||
          (dut.synth1_freq == 0 && 200 + int'(dut.red_blob.h) + int'(dut.lfo_out) <= 0))
        sample_count++;
    end
    check(LFO, f_max - f_min > 500, $sformatf("pitch swing %0d..%0d", f_min, f_max));
    check(LFO, clipped, "pitch never clipped at 0");
    check(LFO, sample_count > 19900, $sformatf("pitch = 200 + h + lfo in %0d samples", sample_count));

    // ---- audio pin over the whole run
    check(PWM, pwm_toggles > 10000 && duty_max - duty_min > 100,
          $sformatf("pwm toggles %0d duty %0d..%0d", pwm_toggles, duty_min, duty_max));

    for (int m = 0; m < N_MECH; m++) begin
      mech_t mm;
      mm = mech_t'(m);
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL mechanism %s never seen", mm.name()); end
      else $display("mechanism %s seen %0d times", mm.name(), seen[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
