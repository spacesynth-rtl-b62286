// amplitude_control: volume control by arithmetic right shift.
//
// The signed input is shifted right by shift_in bits, giving 16 levels 6 dB apart (0 is full
// volume, 15 leaves only the sign). Combinational. Follows the design description; the 4-bit
// shift input is this implementation's encoding of the volume level.
module amplitude_control (
  input  logic signed [15:0] signal_in,
  input  logic [3:0]         shift_in,
  output logic signed [15:0] signal_out
);

  assign signal_out = signal_in >>> shift_in;

endmodule
