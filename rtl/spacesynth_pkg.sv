// spacesynth_pkg: types and constants shared by the SpaceSynth audio, camera and display blocks.
//
// The numbers here follow the design description where it gives them: a 320x240 camera frame
// (76800 pixels), a 1024x768 VGA screen, a 48 kHz audio sample rate on a 65 MHz system clock
// and a blob detection threshold of 200 pixels. The waveshape encoding and the packing of a
// blob's measurements into one struct are this implementation's own choices.
package spacesynth_pkg;

  // Camera frame geometry
  localparam int unsigned CAM_W      = 320;
  localparam int unsigned CAM_H      = 240;
  localparam int unsigned CAM_PIXELS = CAM_W * CAM_H;  // 76800
  localparam int unsigned CAM_AW     = 17;             // frame buffer address width

  // Clocking
  localparam int unsigned SYS_CLK_HZ = 65_000_000;
  localparam int unsigned SAMPLE_HZ  = 48_000;

  // A colour blob counts as detected (crosshair shown, controls updated) at this many pixels
  localparam int unsigned DETECTION_THRESHOLD = 200;

  // Oscillator waveshape, in the order the four shapes are introduced
  typedef enum logic [1:0] {
    WAVE_SINE     = 2'd0,
    WAVE_SQUARE   = 2'd1,
    WAVE_TRIANGLE = 2'd2,
    WAVE_SAW      = 2'd3
  } wave_t;

  // Centroid and area of one thresholded colour, as measured once per frame
  typedef struct packed {
    logic [8:0]  h;     // horizontal centre, 0..319
    logic [7:0]  v;     // vertical centre, 0..239
    logic [16:0] area;  // number of mask pixels counted
  } blob_t;

  // 12-bit display colours (4 bits each of red, green, blue)
  localparam logic [11:0] COL_BLACK   = 12'h000;
  localparam logic [11:0] COL_RED     = 12'hF00;
  localparam logic [11:0] COL_GREEN   = 12'h0F0;
  localparam logic [11:0] COL_BLUE    = 12'h00F;
  localparam logic [11:0] COL_MAGENTA = 12'hF0F;
  localparam logic [11:0] COL_YELLOW  = 12'hFF0;
  localparam logic [11:0] COL_WHITE   = 12'hFFF;

  // ---------------------------------------------------------------------------------------
  // Fixed-point sine and cosine for building tables at elaboration time. The argument and
  // the result are Q30 (1.0 = 2**30); the argument must lie in [0, pi/2]. A Taylor series to
  // the x**13 term keeps the error well below one LSB of a 16-bit table entry.
  // ---------------------------------------------------------------------------------------
  localparam longint Q30_ONE  = 64'sd1 << 30;
  localparam longint Q30_PI   = 64'sd3373259426;  // pi * 2**30
  localparam longint Q30_PI_2 = 64'sd1686629713;  // pi/2 * 2**30

  function automatic longint q30_mul(input longint a, input longint b);
    return (a * b) >>> 30;
  endfunction

  function automatic longint q30_sin(input longint x);
    longint x2, term, acc;
    x2   = q30_mul(x, x);
    term = x;
    acc  = x;
    for (int k = 1; k <= 6; k++) begin
      term = -q30_mul(term, x2) / ((2 * k) * (2 * k + 1));
      acc  = acc + term;
    end
    return acc;
  endfunction

  function automatic longint q30_cos(input longint x);
    longint x2, term, acc;
    x2   = q30_mul(x, x);
    term = Q30_ONE;
    acc  = Q30_ONE;
    for (int k = 1; k <= 6; k++) begin
      term = -q30_mul(term, x2) / ((2 * k - 1) * (2 * k));
      acc  = acc + term;
    end
    return acc;
  endfunction

endpackage
