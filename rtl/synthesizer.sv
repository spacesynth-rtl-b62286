// synthesizer: one subtractive synthesizer voice.
//
// Two oscillators feed a mixer, then the low-pass filter, then amplitude control, as in the
// design description. osc_1 runs at frequency_in; osc_2 runs a number of octaves away,
// obtained by shifting the frequency left (octaves up) or right (octaves down). Both
// waveshapes are selectable. The oscillators advance on sample_trigger, and the filter takes
// the mixed sample on the same strobe.
//
// Own choices: osc2_tuning is a signed 3-bit octave count (-4..+3); an upward shift keeps the
// low 12 bits, like a 12-bit shift register; amplitude_in is the attenuation shift of
// amplitude_control (0 = loudest).
//
// Timing: synth_out is registered and changes five clocks after sample_trigger (filter
// latency plus one); synth_valid pulses then.
module synthesizer
  import spacesynth_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_trigger,
  input  logic [11:0]        frequency_in,
  input  logic [3:0]         amplitude_in,
  input  logic [7:0]         filter_cutoff_in,
  input  wave_t              osc1_shape_in,
  input  wave_t              osc2_shape_in,
  input  logic signed [2:0]  osc2_tuning_in,
  output logic signed [15:0] synth_out,
  output logic               synth_valid
);

  logic [11:0]        osc2_freq;
  logic signed [15:0] osc1_wave, osc2_wave, mixed, filtered, scaled;
  logic               filt_valid;

  always_comb begin
    if (osc2_tuning_in >= 0) osc2_freq = frequency_in << osc2_tuning_in;
    else                     osc2_freq = frequency_in >> (-osc2_tuning_in);
  end

  oscillator u_osc1 (
    .clk, .rst, .step_in(sample_trigger), .freq_in(frequency_in), .shape_in(osc1_shape_in),
    .wave_out(osc1_wave), .phase_out()
  );

  oscillator u_osc2 (
    .clk, .rst, .step_in(sample_trigger), .freq_in(osc2_freq), .shape_in(osc2_shape_in),
    .wave_out(osc2_wave), .phase_out()
  );

  mixer u_mix (.wave1_in(osc1_wave), .wave2_in(osc2_wave), .mixed_out(mixed));

  iir_filter u_filter (
    .clk, .rst, .sample_valid(sample_trigger), .cutoff_in(filter_cutoff_in),
    .waveform_in(mixed), .filter_out(filtered), .out_valid(filt_valid)
  );

  amplitude_control u_amp (.signal_in(filtered), .shift_in(amplitude_in), .signal_out(scaled));

  always_ff @(posedge clk) begin
    if (rst) begin
      synth_out   <= '0;
      synth_valid <= 1'b0;
    end else begin
      synth_valid <= filt_valid;
      if (filt_valid) synth_out <= scaled;
    end
  end

endmodule
