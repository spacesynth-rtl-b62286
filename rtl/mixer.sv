// mixer: combines two signed 16-bit waveforms without overflow.
//
// Each input is halved by an arithmetic right shift and the halves are added, so the sum
// always fits in 16 bits. Purely combinational. This is exactly the mixer of the design
// description; it is used both inside each synthesizer and for the final audio mix.
module mixer (
  input  logic signed [15:0] wave1_in,
  input  logic signed [15:0] wave2_in,
  output logic signed [15:0] mixed_out
);

  assign mixed_out = (wave1_in >>> 1) + (wave2_in >>> 1);

endmodule
