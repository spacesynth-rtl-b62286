// audio_model_pkg: reference models used by the audio testbenches. They compute the expected
// waveforms, filter coefficients and filter response in real and integer arithmetic written
// independently of the RTL.
package audio_model_pkg;

  localparam real PI = 3.14159265358979;

  // phase increment per sample for a frequency in Hz at 48 kHz
  function automatic longint unsigned phase_step(int unsigned f);
    return (longint'(f) * 89478) & 64'hFFFF_FFFF;
  endfunction

  // expected signed oscillator sample for a phase and a shape (0 sine, 1 square, 2 tri, 3 saw)
  function automatic real wave(longint unsigned phase, int shape);
    longint unsigned u;
    case (shape)
      0: return 32767.0 * $sin(2.0 * PI * real'(phase >> 24) / 256.0);
      1: u = (phase < 64'h8000_0000) ? 65535 : 0;
      2: u = (phase < 64'h8000_0000) ? ((phase >> 15) & 16'hFFFF)
                                    : 65535 - ((phase >> 15) & 16'hFFFF);
      default: u = phase >> 16;
    endcase
    return real'(longint'(u) - 32768);
  endfunction

  // quantised first-order low-pass coefficients for cutoff index i
  function automatic void coefs(int i, output real b, output real a);
    real fc, k;
    fc = 100.0 + i * 4900.0 / 255.0;
    k  = $tan(PI * fc / 48000.0);
    b  = $floor(16384.0 * k / (1.0 + k) + 0.5) / 16384.0;
    a  = $floor(16384.0 * (1.0 - k) / (1.0 + k) + 0.5) / 16384.0;
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

endpackage
