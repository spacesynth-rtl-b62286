// control_mapper: turns the tracked LED blobs into synthesizer and LFO settings.
//
// From the design description:
//   * synth 1 frequency = 200 + red horizontal centre (Hz), synth 2 likewise from green;
//     with the LFO enabled its signed output is added, and a sum below zero is clipped to 0;
//     while a hand's blob is not detected (area below 200) its synth frequency is 0.
//   * synth 1 amplitude follows the red vertical position, synth 2 the green one.
//   * the filter cutoff of both synths follows the horizontal distance between the hands.
//   * the LFO frequency follows the red area and the LFO amplitude the green area.
//   * the other controls only change while their blob is detected.
// Own choices (the description gives no scaling): amplitude shift = vertical centre / 16
// (top of frame loudest); cutoff index = distance, saturated at 255; LFO frequency = red
// area / 4096 Hz (0..18 Hz); LFO attenuation shift = 15 - min(green area / 512, 10), so the
// LFO swings at most +-1024 Hz and a large green area can pull a pitch below zero. The
// frequency sum is also clipped at 4095. All outputs are registered.
module control_mapper
  import spacesynth_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  blob_t              red_blob,
  input  blob_t              green_blob,
  input  logic signed [15:0] lfo_in,
  input  logic               lfo_enable,
  output logic [11:0]        synth1_freq,
  output logic [11:0]        synth2_freq,
  output logic [3:0]         synth1_amp,
  output logic [3:0]         synth2_amp,
  output logic [7:0]         filter_cutoff,
  output logic [11:0]        lfo_freq,
  output logic [3:0]         lfo_atten
);

  localparam logic [11:0] BASE_HZ = 12'd200;

  logic red_det, green_det;
  assign red_det   = 32'(red_blob.area)   >= DETECTION_THRESHOLD;
  assign green_det = 32'(green_blob.area) >= DETECTION_THRESHOLD;

  function automatic logic [11:0] pitch(input logic [8:0] h, input logic signed [15:0] lfo,
                                        input logic use_lfo);
    logic signed [17:0] sum;
    sum = 18'(BASE_HZ) + 18'(h) + (use_lfo ? 18'(lfo) : 18'sd0);
    if (sum < 0)             return 12'd0;
    else if (sum > 18'sd4095) return 12'd4095;
    else                     return sum[11:0];
  endfunction

  logic [8:0]  sep;
  logic [4:0]  green_steps;
  assign sep         = (red_blob.h >= green_blob.h) ? red_blob.h - green_blob.h
                                                    : green_blob.h - red_blob.h;
  assign green_steps = (green_blob.area[16:9] > 8'd10) ? 5'd10 : 5'(green_blob.area[16:9]);

  always_ff @(posedge clk) begin
    if (rst) begin
      synth1_freq   <= '0;
      synth2_freq   <= '0;
      synth1_amp    <= 4'd15;
      synth2_amp    <= 4'd15;
      filter_cutoff <= 8'd255;
      lfo_freq      <= '0;
      lfo_atten     <= 4'd15;
    end else begin
      synth1_freq <= red_det   ? pitch(red_blob.h,   lfo_in, lfo_enable) : 12'd0;
      synth2_freq <= green_det ? pitch(green_blob.h, lfo_in, lfo_enable) : 12'd0;
      if (red_det) begin
        synth1_amp <= red_blob.v[7:4];
        lfo_freq   <= 12'(red_blob.area >> 12);
      end
      if (green_det) begin
        synth2_amp <= green_blob.v[7:4];
        lfo_atten  <= 4'(5'd15 - green_steps);
      end
      if (red_det && green_det) filter_cutoff <= (sep > 9'd255) ? 8'd255 : sep[7:0];
    end
  end

endmodule
