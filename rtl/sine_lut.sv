// sine_lut: one period of a sine wave as 256 unsigned 16-bit samples.
//
// The oscillator indexes this table with the top 8 bits of its phasor. Entry i holds
// 32768 + round(32767 * sin(2*pi*i/256)), so the wave is centred on mid-scale and spans
// 1..65535; the oscillator flips the MSB to make it signed. The table size, the sample width and
// the unsigned format follow the design description. The table is computed at elaboration
// by a fixed-point Taylor series (see spacesynth_pkg) instead of being listed, and the read
// is combinational (a distributed ROM).
module sine_lut
  import spacesynth_pkg::*;
(
  input  logic [7:0]  addr_in,   // phase, 0..255 covers one period
  output logic [15:0] amp_out    // unsigned amplitude
);

  typedef logic [255:0][15:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < 256; i++) begin
      longint quad, frac, x, s, scaled;
      quad = longint'(i) / 64;
      frac = longint'(i) % 64;
      x    = (Q30_PI_2 * frac) / 64;            // angle within the quadrant
      case (quad)
        0:       s =  q30_sin(x);
        1:       s =  q30_cos(x);
        2:       s = -q30_sin(x);
        default: s = -q30_cos(x);
      endcase
      // round(32767 * s) with s in Q30, rounding half away from zero
      scaled = 32767 * s;
      if (scaled >= 0) scaled = (scaled + (Q30_ONE / 2)) >>> 30;
      else             scaled = -((-scaled + (Q30_ONE / 2)) >>> 30);
      t[i] = 16'(32768 + scaled);
    end
    return t;
  endfunction

  localparam table_t SINE = build_table();

  assign amp_out = SINE[addr_in];

endmodule
