// top_level: SpaceSynth, a synthesizer played by moving coloured LEDs in front of a camera.
//
// camera_to_mask tracks a red, a green and a blue LED (centre and area once per camera
// frame). control_mapper turns the red hand into synth 1's pitch and volume, the green hand
// into synth 2's, the hands' horizontal distance into the filter cutoff, the red and green
// areas into LFO rate and depth; waveshape_selector takes osc_1's shape from the blue LED.
// Two synthesizer voices (two oscillators, mixer, IIR low-pass, amplitude control each) run on
// the 48 kHz sample_trigger; the LFO is added to both pitches when enabled; the two voices are
// mixed and sent out by pwm. xvga and vga_display show the three masks with crosshairs and
// bar graphs of the controls. This wiring follows the design description's top-level diagram.
//
// Switches: sw[1:0] LFO waveshape, sw[2] raw camera view, sw[10:7] threshold setting and
// sw[14] LFO enable follow the description; sw[4:3] osc_2 waveshape and sw[13:11] osc_2
// octave offset (signed) are this implementation's choices. The label image ROM is outside
// this design: its address goes out and its pixel comes in, two clocks later.
// The audio pin is open-drain: aud_pwm_release = 1 means high impedance, 0 means drive low.
module top_level
  import spacesynth_pkg::*;
(
  input  logic        clk_65mhz,
  input  logic        rst,
  input  logic [15:0] sw,
  // camera
  output logic        cam_xclk,
  input  logic        cam_pclk,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  // label image ROM
  output logic [17:0] label_rom_addr,
  input  logic [11:0] label_rom_pixel,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  // audio
  output logic        aud_pwm_release
);

  logic clk;
  assign clk = clk_65mhz;

  // ---------------- camera and tracking
  blob_t       red_blob, green_blob, blue_blob;
  logic [16:0] red_addr, green_addr, blue_addr, raw_addr;
  logic [11:0] red_buff, green_buff, blue_buff, raw_buff;

  camera_to_mask u_cam (
    .clk, .rst, .cam_xclk, .cam_pclk, .cam_vsync, .cam_href, .cam_data,
    .threshold_sel(sw[10:7]),
    .red_addr, .green_addr, .blue_addr, .raw_addr,
    .red_buff_out(red_buff), .green_buff_out(green_buff), .blue_buff_out(blue_buff),
    .raw_image_buff_out(raw_buff),
    .red_blob, .green_blob, .blue_blob, .blobs_valid()
  );

  // ---------------- controls
  logic               sample_tick;
  logic signed [15:0] lfo_out;
  logic [11:0]        synth1_freq, synth2_freq, lfo_freq;
  logic [3:0]         synth1_amp, synth2_amp, lfo_atten;
  logic [7:0]         cutoff;
  wave_t              osc1_shape, osc2_shape;

  sample_trigger u_trig (.clk, .rst, .trigger_out(sample_tick));

  lfo u_lfo (
    .clk, .rst, .sample_trigger(sample_tick), .freq_in(lfo_freq), .shape_in(wave_t'(sw[1:0])),
    .atten_in(lfo_atten), .lfo_out
  );

  control_mapper u_map (
    .clk, .rst, .red_blob, .green_blob, .lfo_in(lfo_out), .lfo_enable(sw[14]),
    .synth1_freq, .synth2_freq, .synth1_amp, .synth2_amp, .filter_cutoff(cutoff),
    .lfo_freq, .lfo_atten
  );

  waveshape_selector u_shape (
    .clk, .rst, .blue_blob, .osc2_shape_sw(sw[4:3]), .osc1_shape, .osc2_shape
  );

  // ---------------- audio
  logic signed [15:0] synth1_out, synth2_out, audio;

  synthesizer u_synth1 (
    .clk, .rst, .sample_trigger(sample_tick), .frequency_in(synth1_freq),
    .amplitude_in(synth1_amp), .filter_cutoff_in(cutoff), .osc1_shape_in(osc1_shape),
    .osc2_shape_in(osc2_shape), .osc2_tuning_in(signed'(sw[13:11])),
    .synth_out(synth1_out), .synth_valid()
  );

  synthesizer u_synth2 (
    .clk, .rst, .sample_trigger(sample_tick), .frequency_in(synth2_freq),
    .amplitude_in(synth2_amp), .filter_cutoff_in(cutoff), .osc1_shape_in(osc1_shape),
    .osc2_shape_in(osc2_shape), .osc2_tuning_in(signed'(sw[13:11])),
    .synth_out(synth2_out), .synth_valid()
  );

  mixer u_mix (.wave1_in(synth1_out), .wave2_in(synth2_out), .mixed_out(audio));

  pwm u_pwm (
    .clk, .rst, .level_in({~audio[15], audio[14:0]}), .pwm_release(aud_pwm_release)
  );

  // ---------------- display
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;

  xvga u_xvga (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  vga_display u_disp (
    .clk, .rst, .hcount, .vcount, .hsync_in(hsync), .vsync_in(vsync), .blank_in(blank),
    .show_raw(sw[2]), .red_blob, .green_blob, .blue_blob,
    .red_addr, .green_addr, .blue_addr, .raw_addr, .label_addr(label_rom_addr),
    .red_buff, .green_buff, .blue_buff, .raw_buff, .label_pixel(label_rom_pixel),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs
  );

endmodule
