// tb_oscillator: drives sample strobes at several frequencies and all four shapes, and checks
// each sample against a phase accumulated in the testbench (exact for square, triangle and
// sawtooth, one LSB for sine). Also checks the rate: at 1000 Hz the phasor must wrap 10 times (9 when the run starts just after a wrap)
// in 480 samples.
module tb_oscillator;
  import audio_model_pkg::*;
  import spacesynth_pkg::*;

  logic clk = 0, rst = 1, step = 0;
  logic [11:0] freq;
  wave_t shape;
  logic signed [15:0] w;
  logic [31:0] ph;
  int checks = 0, failures = 0;

  oscillator dut (.clk, .rst, .step_in(step), .freq_in(freq), .shape_in(shape), .wave_out(w),
                  .phase_out(ph));

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned model;
    int freqs [5] = '{1000, 440, 4095, 1, 2000};
    freq = 0; shape = WAVE_SINE;
    repeat (3) @(posedge clk);
    rst = 0;
    model = 0;
    foreach (freqs[n]) begin
      for (int s = 0; s < 4; s++) begin
        int wraps;
        freq = 12'(freqs[n]);
        shape = wave_t'(s);
        wraps = 0;
        for (int k = 0; k < 480; k++) begin
          real exp;
          @(posedge clk); step <= 1;
          @(posedge clk); step <= 0;
          if (model + phase_step(freqs[n]) > 64'hFFFF_FFFF) wraps++;
          model = (model + phase_step(freqs[n])) & 64'hFFFF_FFFF;
          #1;
          exp = wave(model, s);
          checks++;
          if (absr(real'(w) - exp) > ((s == 0) ? 1.0 : 0.0) || longint'(ph) != model) begin
            failures++;
            if (failures < 10)
              $display("FAIL f=%0d shape=%0d sample %0d: %0d expected %f (phase %h/%h)",
                       freqs[n], s, k, w, exp, ph, model);
          end
        end
        if (freqs[n] == 1000) begin
          checks++;
          if (wraps < 9 || wraps > 10) begin
            failures++;
            $display("FAIL 1000 Hz: %0d periods in 480 samples", wraps);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
