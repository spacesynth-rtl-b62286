// lfo: low-frequency oscillator used to modulate pitch.
//
// An oscillator followed by amplitude control, exactly as in each synthesizer, but driven with
// frequencies of a few hertz. The attenuated signed wave is what the controls add to the
// synthesizer frequencies. Follows the design description.
//
// Timing: lfo_out follows the phasor register, one clock after sample_trigger.
module lfo
  import spacesynth_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_trigger,
  input  logic [11:0]        freq_in,
  input  wave_t              shape_in,
  input  logic [3:0]         atten_in,
  output logic signed [15:0] lfo_out
);

  logic signed [15:0] wave;

  oscillator u_osc (
    .clk, .rst, .step_in(sample_trigger), .freq_in, .shape_in, .wave_out(wave), .phase_out()
  );

  amplitude_control u_amp (.signal_in(wave), .shift_in(atten_in), .signal_out(lfo_out));

endmodule
