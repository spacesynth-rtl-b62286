// camera_to_mask: camera capture, colour classification, frame buffers and blob tracking.
//
// Data path (after the block diagrams of the design description):
//   camera_read (camera pixel clock) -> clock crossing -> two paths on the system clock:
//   1. raw path: the RGB565 pixel is cut to 12 bits (top 4 bits of each colour) and written
//      to the 12 x 76800 image buffer one clock after it is taken over;
//   2. mask path: rgb_2_hsv (22 clocks) -> thresholding -> one bit each into the red, green
//      and blue 1 x 76800 mask buffers, and into three center_finder instances.
// The pixel's address and indices travel through a 22-stage delay line beside rgb_2_hsv so
// that every mask bit is written, and counted, with its own pixel's address and indices. The
// read ports of the four buffers have independent addresses and two clocks of latency; the
// mask bits are expanded combinationally to 12-bit colours (12'hF00, 12'h0F0, 12'h00F or
// black). xclk for the camera is the system clock divided by four (16.25 MHz at 65 MHz).
//
// Own choices: the crossing from the camera clock uses a toggle flag synchronised by two
// flip-flops; the pixel, address and indices are held in the camera domain until the next
// pixel, which comes at least two camera clocks later, so the system clock must be at least
// about twice the camera pixel clock. The 5/6/5-bit colours are widened to 8 bits by
// appending zeros.
module camera_to_mask
  import spacesynth_pkg::*;
(
  input  logic        clk,              // 65 MHz system clock
  input  logic        rst,
  // camera
  output logic        cam_xclk,
  input  logic        cam_pclk,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  // threshold setting (switches 7..10)
  input  logic [3:0]  threshold_sel,
  // frame buffer read ports (two clocks latency)
  input  logic [16:0] red_addr,
  input  logic [16:0] green_addr,
  input  logic [16:0] blue_addr,
  input  logic [16:0] raw_addr,
  output logic [11:0] red_buff_out,
  output logic [11:0] green_buff_out,
  output logic [11:0] blue_buff_out,
  output logic [11:0] raw_image_buff_out,
  // per-frame blob measurements
  output blob_t       red_blob,
  output blob_t       green_blob,
  output blob_t       blue_blob,
  output logic        blobs_valid       // pulses when the red measurement updates
);

  localparam int unsigned HSV_LATENCY = 22;

  // ---------------- camera clock and reader
  logic [1:0] xclk_div;
  always_ff @(posedge clk) begin
    if (rst) xclk_div <= '0;
    else     xclk_div <= xclk_div + 1'b1;
  end
  assign cam_xclk = xclk_div[1];

  logic [15:0] cr_pixel;
  logic        cr_valid;
  logic [16:0] cr_addr;
  logic [8:0]  cr_h;
  logic [7:0]  cr_v;

  camera_read u_read (
    .p_clock(cam_pclk), .rst, .vsync_in(cam_vsync), .href_in(cam_href), .p_data_in(cam_data),
    .pixel_data_out(cr_pixel), .pixel_valid_out(cr_valid), .frame_done_out(),
    .pixel_addr_out(cr_addr), .h_idx_out(cr_h), .v_idx_out(cr_v)
  );

  // ---------------- crossing into the system clock
  logic       pix_toggle;
  always_ff @(posedge cam_pclk) begin
    if (rst)           pix_toggle <= 1'b0;
    else if (cr_valid) pix_toggle <= !pix_toggle;
  end

  logic [2:0] tog_sync;
  logic       take;
  always_ff @(posedge clk) begin
    if (rst) tog_sync <= '0;
    else     tog_sync <= {tog_sync[1:0], pix_toggle};
  end
  assign take = tog_sync[2] ^ tog_sync[1];

  logic        p_valid;
  logic [15:0] p_pixel;
  logic [16:0] p_addr;
  logic [8:0]  p_h;
  logic [7:0]  p_v;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= 1'b0;
      p_pixel <= '0;
      p_addr  <= '0;
      p_h     <= '0;
      p_v     <= '0;
    end else begin
      p_valid <= take;
      if (take) begin
        p_pixel <= cr_pixel;
        p_addr  <= cr_addr;
        p_h     <= cr_h;
        p_v     <= cr_v;
      end
    end
  end

  // ---------------- path 1: raw image
  logic        raw_we;
  logic [16:0] raw_waddr;
  logic [11:0] raw_wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      raw_we    <= 1'b0;
      raw_waddr <= '0;
      raw_wdata <= '0;
    end else begin
      raw_we    <= p_valid;
      raw_waddr <= p_addr;
      raw_wdata <= {p_pixel[15:12], p_pixel[10:7], p_pixel[4:1]};
    end
  end

  // ---------------- path 2: HSV classification
  logic       hsv_valid;
  logic [7:0] hue, sat, val;

  rgb_2_hsv u_hsv (
    .clk, .rst, .valid_in(p_valid),
    .r_in({p_pixel[15:11], 3'b000}), .g_in({p_pixel[10:5], 2'b00}), .b_in({p_pixel[4:0], 3'b000}),
    .valid_out(hsv_valid), .h_out(hue), .s_out(sat), .v_out(val)
  );

  typedef struct packed {
    logic [16:0] addr;
    logic [8:0]  h;
    logic [7:0]  v;
  } pix_pos_t;

  pix_pos_t pos_dly [HSV_LATENCY+1];
  assign pos_dly[0] = '{addr: p_addr, h: p_h, v: p_v};
  for (genvar i = 0; i < HSV_LATENCY; i++) begin : g_pos
    always_ff @(posedge clk) pos_dly[i+1] <= pos_dly[i];
  end

  logic is_red, is_green, is_blue;
  thresholding u_thresh (
    .h_in(hue), .s_in(sat), .v_in(val), .setting_in(threshold_sel),
    .red_out(is_red), .green_out(is_green), .blue_out(is_blue)
  );

  logic     m_we;
  logic     m_red, m_green, m_blue;
  pix_pos_t m_pos;

  always_ff @(posedge clk) begin
    if (rst) begin
      m_we    <= 1'b0;
      m_red   <= 1'b0;
      m_green <= 1'b0;
      m_blue  <= 1'b0;
      m_pos   <= '0;
    end else begin
      m_we <= hsv_valid;
      if (hsv_valid) begin
        m_red   <= is_red;
        m_green <= is_green;
        m_blue  <= is_blue;
        m_pos   <= pos_dly[HSV_LATENCY];
      end
    end
  end

  // ---------------- frame buffers
  logic red_bit, green_bit, blue_bit;

  frame_bram #(.WIDTH(1), .DEPTH(CAM_PIXELS)) u_red_bram (
    .clk, .we_a(m_we), .addr_a(m_pos.addr), .din_a(m_red), .addr_b(red_addr), .dout_b(red_bit)
  );
  frame_bram #(.WIDTH(1), .DEPTH(CAM_PIXELS)) u_green_bram (
    .clk, .we_a(m_we), .addr_a(m_pos.addr), .din_a(m_green), .addr_b(green_addr), .dout_b(green_bit)
  );
  frame_bram #(.WIDTH(1), .DEPTH(CAM_PIXELS)) u_blue_bram (
    .clk, .we_a(m_we), .addr_a(m_pos.addr), .din_a(m_blue), .addr_b(blue_addr), .dout_b(blue_bit)
  );
  frame_bram #(.WIDTH(12), .DEPTH(CAM_PIXELS)) u_image_bram (
    .clk, .we_a(raw_we), .addr_a(raw_waddr), .din_a(raw_wdata), .addr_b(raw_addr),
    .dout_b(raw_image_buff_out)
  );

  assign red_buff_out   = red_bit   ? COL_RED   : COL_BLACK;
  assign green_buff_out = green_bit ? COL_GREEN : COL_BLACK;
  assign blue_buff_out  = blue_bit  ? COL_BLUE  : COL_BLACK;

  // ---------------- blob tracking
  center_finder u_red_cf (
    .clk, .rst, .pixel_in(m_red), .h_index(m_pos.h), .v_index(m_pos.v),
    .h_index_out(red_blob.h), .v_index_out(red_blob.v), .area_out(red_blob.area),
    .result_valid(blobs_valid)
  );
  center_finder u_green_cf (
    .clk, .rst, .pixel_in(m_green), .h_index(m_pos.h), .v_index(m_pos.v),
    .h_index_out(green_blob.h), .v_index_out(green_blob.v), .area_out(green_blob.area),
    .result_valid()
  );
  center_finder u_blue_cf (
    .clk, .rst, .pixel_in(m_blue), .h_index(m_pos.h), .v_index(m_pos.v),
    .h_index_out(blue_blob.h), .v_index_out(blue_blob.v), .area_out(blue_blob.area),
    .result_valid()
  );

endmodule
