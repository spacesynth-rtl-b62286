// waveshape_selector: picks the oscillator waveshapes from the blue LED position.
//
// The blue camera sub-image is split into four vertical regions REGION_W pixels wide; the
// region holding the blue blob's centre selects osc_1's shape (sine, square, triangle,
// sawtooth from left to right). osc_2's shape comes from two switches. The shape only changes
// while the blue blob is detected (area at least DETECTION_THRESHOLD); otherwise it is held.
// The design description names the selector, draws it between the camera and both
// synthesizers, shows region dividers on the blue display and says shapes can be set by
// gesture or by switch; the region count, widths and switch use are this implementation's.
// Output registered, one clock after its inputs.
module waveshape_selector
  import spacesynth_pkg::*;
#(
  parameter int unsigned REGION_W = 80
) (
  input  logic       clk,
  input  logic       rst,
  input  blob_t      blue_blob,
  input  logic [1:0] osc2_shape_sw,
  output wave_t      osc1_shape,
  output wave_t      osc2_shape
);

  logic [1:0] region;

  always_comb begin
    if      (32'(blue_blob.h) < REGION_W)     region = 2'd0;
    else if (32'(blue_blob.h) < 2 * REGION_W) region = 2'd1;
    else if (32'(blue_blob.h) < 3 * REGION_W) region = 2'd2;
    else                                      region = 2'd3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      osc1_shape <= WAVE_SINE;
      osc2_shape <= WAVE_SINE;
    end else begin
      osc2_shape <= wave_t'(osc2_shape_sw);
      if (32'(blue_blob.area) >= DETECTION_THRESHOLD) osc1_shape <= wave_t'(region);
    end
  end

endmodule
