// tb_lfo: checks the LFO output against a testbench phase accumulator, the waveform formulas
// and the attenuation shift, for several rates, shapes and depths.
// Samples are strobed every few clocks instead of at 48 kHz to keep the run short; the output
// is checked one clock after each strobe, when the phasor has moved.
module tb_lfo;
  import audio_model_pkg::*;
  import spacesynth_pkg::*;

  logic clk = 0, rst = 1, trig = 0;
  logic [11:0] freq;
  wave_t shape;
  logic [3:0] att;
  logic signed [15:0] out;
  int checks = 0, failures = 0;

  lfo dut (.clk, .rst, .sample_trigger(trig), .freq_in(freq), .shape_in(shape), .atten_in(att),
           .lfo_out(out));

  always #5 clk = !clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned p;
    freq = 0; shape = WAVE_SINE; att = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    p = 0;
    for (int n = 0; n < 12; n++) begin
      int f;
      f = (n % 3 == 0) ? 5 : (n % 3 == 1) ? 18 : 200;
      freq = 12'(f); shape = wave_t'(n % 4); att = 4'((n * 3) % 16);
      for (int k = 0; k < 400; k++) begin
        real ex;
        @(posedge clk); trig <= 1;
        @(posedge clk); trig <= 0;
        p = (p + phase_step(f)) & 64'hFFFF_FFFF;
        #1;
        ex = $floor(wave(p, n % 4) / (2.0 ** ((n * 3) % 16)));
        checks++;
        if (absr(real'(out) - ex) > ((n % 4 == 0) ? 1.0 : 0.0)) begin
          failures++;
          if (failures < 10) $display("FAIL lfo n=%0d k=%0d: %0d expected %f", n, k, out, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
