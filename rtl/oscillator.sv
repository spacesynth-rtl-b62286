// oscillator: phasor-based audio oscillator with four waveshapes.
//
// A 32-bit phasor advances once per sample strobe by freq_in * 2**32 / SAMPLE_HZ, so it wraps
// freq_in times per second and is itself a sawtooth of the phase. The output is derived from it:
//   sawtooth  top 16 bits of the phasor
//   triangle  phasor[30:15] while phasor[31] is 0, 16'hFFFF - phasor[30:15] while it is 1
//   square    16'hFFFF while phasor[31] is 0, 0 while it is 1
//   sine      sine_lut[phasor[31:24]]
// and in every case the MSB is inverted to turn the unsigned ramp into a signed sample. All of
// this follows the design description, as do the 12-bit frequency input (0..4095 Hz) and the
// 48 kHz rate. The step is rounded to an integer constant per hertz (89478 at 48 kHz).
//
// Timing: the phasor updates on the clock edge where step_in is high; wave_out is a
// combinational function of the phasor register, so it changes the cycle after the strobe.
module oscillator
  import spacesynth_pkg::*;
#(
  parameter int unsigned SAMPLE_RATE = SAMPLE_HZ
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               step_in,    // one-cycle sample strobe
  input  logic [11:0]        freq_in,    // frequency in Hz
  input  wave_t              shape_in,
  output logic signed [15:0] wave_out,
  output logic [31:0]        phase_out
);

  // round(2**32 / SAMPLE_RATE)
  localparam longint unsigned STEP_PER_HZ_L = ((64'd1 << 32) + 64'(SAMPLE_RATE / 2)) / 64'(SAMPLE_RATE);
  localparam logic [31:0] STEP_PER_HZ = 32'(STEP_PER_HZ_L);

  logic [31:0] phase;
  logic [31:0] phase_step;
  logic [15:0] sine_amp;
  logic [15:0] raw;

  assign phase_step = 32'(freq_in) * STEP_PER_HZ;

  always_ff @(posedge clk) begin
    if (rst)          phase <= '0;
    else if (step_in) phase <= phase + phase_step;
  end

  sine_lut u_sine (.addr_in(phase[31:24]), .amp_out(sine_amp));

  always_comb begin
    unique case (shape_in)
      WAVE_SINE:     raw = sine_amp;
      WAVE_SQUARE:   raw = phase[31] ? 16'h0000 : 16'hFFFF;
      WAVE_TRIANGLE: raw = phase[31] ? (16'hFFFF - phase[30:15]) : phase[30:15];
      default:       raw = phase[31:16];
    endcase
  end

  assign wave_out  = signed'({~raw[15], raw[14:0]});
  assign phase_out = phase;

endmodule
