// tb_synthesizer: runs the voice in several settings (frequency, both shapes, octave offset,
// volume, cutoff) and compares every output sample with a model built in the testbench: two
// phase accumulators, waveform formulas, halving mixer, real-valued first-order low-pass with
// the quantised coefficients, and the volume shift. The model's filter state is re-aligned to
// the RTL filter output after each sample so that rounding does not accumulate. Also checks
// that synth_valid comes exactly five clocks after the sample strobe.
module tb_synthesizer;
  import audio_model_pkg::*;
  import spacesynth_pkg::*;

  logic clk = 0, rst = 1, trig = 0;
  logic [11:0] freq;
  logic [3:0] amp;
  logic [7:0] cut;
  wave_t s1, s2;
  logic signed [2:0] tune;
  logic signed [15:0] out;
  logic ovalid;
  int checks = 0, failures = 0;

  synthesizer dut (.clk, .rst, .sample_trigger(trig), .frequency_in(freq), .amplitude_in(amp),
                   .filter_cutoff_in(cut), .osc1_shape_in(s1), .osc2_shape_in(s2),
                   .osc2_tuning_in(tune), .synth_out(out), .synth_valid(ovalid));

  always #5 clk = !clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int f; int sh1; int sh2; int t; int a; int c; } cfg_t;

  initial begin
    cfg_t cfgs [5] = '{
      '{440, 1, 1, 0, 0, 255}, '{300, 3, 2, 1, 2, 100}, '{1000, 0, 1, -2, 5, 30},
      '{1000, 2, 3, 3, 1, 200}, '{523, 1, 0, -1, 0, 0}};
    longint unsigned p1, p2;
    freq = 0; amp = 0; cut = 0; s1 = WAVE_SINE; s2 = WAVE_SINE; tune = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    p1 = 0; p2 = 0;
    foreach (cfgs[n]) begin
      int f2;
      real b, a, xp, ym;
      freq = 12'(cfgs[n].f); s1 = wave_t'(cfgs[n].sh1); s2 = wave_t'(cfgs[n].sh2);
      tune = 3'(cfgs[n].t); amp = 4'(cfgs[n].a); cut = 8'(cfgs[n].c);
      f2 = (cfgs[n].t >= 0) ? ((cfgs[n].f << cfgs[n].t) & 12'hFFF) : (cfgs[n].f >> -cfgs[n].t);
      coefs(cfgs[n].c, b, a);
      xp = real'(dut.u_filter.x_prev);
      for (int k = 0; k < 600; k++) begin
        real x, yf, ex, tol;
        int lat;
        @(posedge clk);
        ym = real'(dut.u_filter.filter_out);
        x = $floor(wave(p1, cfgs[n].sh1) / 2.0) + $floor(wave(p2, cfgs[n].sh2) / 2.0);
        p1 = (p1 + phase_step(cfgs[n].f)) & 64'hFFFF_FFFF;
        p2 = (p2 + phase_step(f2)) & 64'hFFFF_FFFF;
        trig <= 1;
        @(posedge clk);
        trig <= 0;
        lat = 0;
        do begin @(posedge clk); lat++; #1; end while (!ovalid && lat < 20);
        yf = a * ym + b * x + b * xp;
        xp = x;
        ex = $floor(yf / (2.0 ** cfgs[n].a));
        tol = 4.0 / (2.0 ** cfgs[n].a) + 1.0;
        checks++;
        if (lat != 5) begin
          failures++;
          $display("FAIL synth_valid latency %0d, expected 5", lat);
        end
        checks++;
        if (k > 2 && absr(real'(out) - ex) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL cfg %0d sample %0d: %0d expected %f", n, k, out, ex);
        end
        repeat (10) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
