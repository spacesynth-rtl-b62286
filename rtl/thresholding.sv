// thresholding: classifies one HSV pixel as red, green or blue LED light.
//
// A pixel belongs to a colour when its hue lies in that colour's window and its saturation
// and value reach the minimums of the active setting. Red's hue window wraps through 0.
// The design description tunes hue, saturation and value windows by experiment and lets four
// switches (sw[7] to sw[10]) choose between alternative settings; it does not print the
// numbers. The windows and the five settings below are therefore this implementation's own:
// with no switch up the default applies, otherwise the highest switch that is up picks its
// setting. Combinational.
module thresholding #(
  parameter logic [7:0] RED_H_LO   = 8'd235,  // red: h >= RED_H_LO or h <= RED_H_HI
  parameter logic [7:0] RED_H_HI   = 8'd10,
  parameter logic [7:0] GREEN_H_LO = 8'd64,
  parameter logic [7:0] GREEN_H_HI = 8'd120,
  parameter logic [7:0] BLUE_H_LO  = 8'd145,
  parameter logic [7:0] BLUE_H_HI  = 8'd190
) (
  input  logic [7:0] h_in,
  input  logic [7:0] s_in,
  input  logic [7:0] v_in,
  input  logic [3:0] setting_in,   // sw[10:7]
  output logic       red_out,
  output logic       green_out,
  output logic       blue_out
);

  typedef struct packed {
    logic [7:0] s_min;
    logic [7:0] v_min;
  } limits_t;

  localparam limits_t SETTINGS [5] = '{
    '{s_min: 8'd80,  v_min: 8'd96},   // default
    '{s_min: 8'd60,  v_min: 8'd64},   // sw[7]
    '{s_min: 8'd100, v_min: 8'd128},  // sw[8]
    '{s_min: 8'd120, v_min: 8'd160},  // sw[9]
    '{s_min: 8'd140, v_min: 8'd192}   // sw[10]
  };

  limits_t lim;
  logic    bright;

  always_comb begin
    if      (setting_in[3]) lim = SETTINGS[4];
    else if (setting_in[2]) lim = SETTINGS[3];
    else if (setting_in[1]) lim = SETTINGS[2];
    else if (setting_in[0]) lim = SETTINGS[1];
    else                    lim = SETTINGS[0];
    bright    = (s_in >= lim.s_min) && (v_in >= lim.v_min);
    red_out   = bright && ((h_in >= RED_H_LO) || (h_in <= RED_H_HI));
    green_out = bright && (h_in >= GREEN_H_LO) && (h_in <= GREEN_H_HI);
    blue_out  = bright && (h_in >= BLUE_H_LO) && (h_in <= BLUE_H_HI);
  end

endmodule
