// filter_coefs: coefficient table for the first-order low-pass filter.
//
// Index i (0..255) selects a cutoff fc = 100 Hz + i * (5000 - 100) / 255 Hz, i.e. the 100 Hz to
// 5 kHz range in 256 steps as in the design description. For each cutoff the table holds the
// first-order Butterworth low-pass obtained by the bilinear transform with prewarping (what
// scipy's iirfilter returns), with K = tan(pi * fc / 48000):
//   b0 = b1 = K / (1 + K)          a1 = (1 - K) / (1 + K)
// each scaled by 2**14 and rounded to a signed 16-bit number. a1 is stored with the sign that
// makes the filter a plain sum, y[n] = a1*y[n-1] + b0*x[n] + b1*x[n-1]. The linear spacing of
// the steps and the sign convention of a1 are this implementation's reading; the table is
// computed at elaboration (fixed-point sine/cosine from spacesynth_pkg) instead of being listed.
// The read is combinational.
module filter_coefs
  import spacesynth_pkg::*;
#(
  parameter int unsigned FC_MIN_HZ = 100,
  parameter int unsigned FC_MAX_HZ = 5000,
  parameter int unsigned FS_HZ     = SAMPLE_HZ
) (
  input  logic [7:0]         cutoff_in,
  output logic signed [15:0] b0_out,
  output logic signed [15:0] b1_out,
  output logic signed [15:0] a1_out
);

  typedef logic [255:0][15:0] table_t;
  typedef struct packed { table_t b; table_t a; } tables_t;

  function automatic tables_t build_tables();
    tables_t t;
    for (int i = 0; i < 256; i++) begin
      longint fc255, theta, k, den;
      // cutoff times 255, to keep the steps exact
      fc255 = longint'(FC_MIN_HZ) * 255 + longint'(i) * (longint'(FC_MAX_HZ) - longint'(FC_MIN_HZ));
      theta = (Q30_PI * fc255) / (longint'(FS_HZ) * 255);       // pi*fc/fs in Q30
      k     = (q30_sin(theta) <<< 30) / q30_cos(theta);         // tan, Q30
      den   = Q30_ONE + k;
      t.b[i] = 16'(((k <<< 14) + den / 2) / den);
      t.a[i] = 16'((((Q30_ONE - k) <<< 14) + den / 2) / den);
    end
    return t;
  endfunction

  localparam tables_t COEF = build_tables();

  assign b0_out = signed'(COEF.b[cutoff_in]);
  assign b1_out = signed'(COEF.b[cutoff_in]);
  assign a1_out = signed'(COEF.a[cutoff_in]);

endmodule
