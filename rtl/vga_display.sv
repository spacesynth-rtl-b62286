// vga_display: composes the 1024 x 768 screen from the camera buffers and the controls.
//
// Screen layout (from the design description):
//   rows 0..239, columns 0..319     red mask, or the raw camera image when show_raw is set
//   rows 0..239, columns 320..639   blue mask, with yellow region dividers
//   rows 0..239, columns 640..959   green mask
//   a magenta crosshair through each blob's centre, drawn only while that blob is detected
//   lower part                      label image from an external ROM, then nine bar graphs
// Buffer read addresses are computed combinationally from hcount/vcount for all four buffers
// at once (red/raw: h + 320*v, blue: (h - 320) + 320*v, green: (h - 640) + 320*v), so every
// buffer answers for the same screen position. The buffers and the label ROM return data two
// clocks later; hcount/vcount are delayed by two clocks to meet it, and current_pixel is
// registered, so the colour appears three clocks after xvga's counters. hsync, vsync and
// blank are delayed by the same three clocks.
//
// Bars: for each colour, vertical position (0..239 tall), horizontal position (0..319 tall)
// and area / 256 (0..300 tall), drawn upward from row 767 inside a white outline of the full
// range, filled with the colour of the LED.
// Own choices: the label image occupies rows 240..429 (it is 1024 x 190 as described, one
// 12-bit pixel per word, row-major); bar columns, bar width and the divider positions
// (every REGION_W pixels, matching waveshape_selector) are not given and are chosen here.
// With show_raw set, the blue and green areas are black.
module vga_display
  import spacesynth_pkg::*;
#(
  parameter int unsigned REGION_W  = 80,
  parameter int unsigned LABEL_TOP = 240,
  parameter int unsigned LABEL_H   = 190,
  parameter int unsigned BAR_W     = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        hsync_in,
  input  logic        vsync_in,
  input  logic        blank_in,
  input  logic        show_raw,
  input  blob_t       red_blob,
  input  blob_t       green_blob,
  input  blob_t       blue_blob,
  output logic [16:0] red_addr,
  output logic [16:0] green_addr,
  output logic [16:0] blue_addr,
  output logic [16:0] raw_addr,
  output logic [17:0] label_addr,
  input  logic [11:0] red_buff,
  input  logic [11:0] green_buff,
  input  logic [11:0] blue_buff,
  input  logic [11:0] raw_buff,
  input  logic [11:0] label_pixel,
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs
);

  localparam int unsigned BASE_ROW = 767;
  localparam int unsigned NBARS    = 9;
  // left edge of each bar: red y, x, area; blue y, x, area; green y, x, area
  localparam int unsigned BAR_X [NBARS] = '{96, 192, 288, 416, 512, 608, 736, 832, 928};

  // ---------------- addresses (cycle 0)
  logic [31:0] row_base;
  assign row_base   = 32'(vcount) * 32'd320;
  assign red_addr   = 17'(row_base + 32'(hcount));
  assign raw_addr   = red_addr;
  assign blue_addr  = 17'(row_base + 32'(hcount) - 32'd320);
  assign green_addr = 17'(row_base + 32'(hcount) - 32'd640);
  assign label_addr = 18'((32'(vcount) - LABEL_TOP) * 32'd1024 + 32'(hcount));

  // ---------------- align position and syncs with the buffer data (cycle 2)
  logic [10:0] hc [3];
  logic [9:0]  vc [3];
  logic [1:0]  hs_d, vs_d, bl_d;

  assign hc[0] = hcount;
  assign vc[0] = vcount;
  always_ff @(posedge clk) begin
    hc[1] <= hc[0];
    hc[2] <= hc[1];
    vc[1] <= vc[0];
    vc[2] <= vc[1];
    if (rst) begin
      hs_d <= '1;
      vs_d <= '1;
      bl_d <= '1;
    end else begin
      hs_d <= {hs_d[0], hsync_in};
      vs_d <= {vs_d[0], vsync_in};
      bl_d <= {bl_d[0], blank_in};
    end
  end

  // ---------------- pixel selection
  function automatic logic on_cross(input blob_t b, input logic [10:0] lx, input logic [9:0] ly);
    return (32'(b.area) >= DETECTION_THRESHOLD) &&
           ((lx == 11'(b.h)) || (ly == 10'(b.v)));
  endfunction

  logic [11:0] pix;
  logic [10:0] x;
  logic [9:0]  y;
  logic [9:0]  bar_val [NBARS];
  logic [9:0]  bar_rng [NBARS];
  logic [11:0] bar_col [NBARS];
  logic [9:0]  h_from_base;

  always_comb begin
    x = hc[2];
    y = vc[2];
    h_from_base = 10'(BASE_ROW) - y;
    bar_val = '{10'(red_blob.v),   10'(red_blob.h),   10'(red_blob.area >> 8),
                10'(blue_blob.v),  10'(blue_blob.h),  10'(blue_blob.area >> 8),
                10'(green_blob.v), 10'(green_blob.h), 10'(green_blob.area >> 8)};
    bar_rng = '{10'd240, 10'd320, 10'd300, 10'd240, 10'd320, 10'd300, 10'd240, 10'd320, 10'd300};
    bar_col = '{COL_RED, COL_RED, COL_RED, COL_BLUE, COL_BLUE, COL_BLUE,
                COL_GREEN, COL_GREEN, COL_GREEN};
    pix = COL_BLACK;
    if (y < 10'(CAM_H)) begin
      if (x < 11'(CAM_W)) begin
        if (show_raw)                        pix = raw_buff;
        else if (on_cross(red_blob, x, y))   pix = COL_MAGENTA;
        else                                 pix = red_buff;
      end else if (x < 11'(2 * CAM_W)) begin
        if (show_raw)                                      pix = COL_BLACK;
        else if ((32'(x - 11'(CAM_W)) % REGION_W == 0) && (x != 11'(CAM_W)))
                                                           pix = COL_YELLOW;
        else if (on_cross(blue_blob, x - 11'(CAM_W), y))   pix = COL_MAGENTA;
        else                                               pix = blue_buff;
      end else if (x < 11'(3 * CAM_W)) begin
        if (show_raw)                                         pix = COL_BLACK;
        else if (on_cross(green_blob, x - 11'(2 * CAM_W), y)) pix = COL_MAGENTA;
        else                                                  pix = green_buff;
      end
    end else if (32'(y) < LABEL_TOP + LABEL_H) begin
      pix = label_pixel;
    end else begin
      for (int i = 0; i < NBARS; i++) begin
        if ((32'(x) >= BAR_X[i]) && (32'(x) < BAR_X[i] + BAR_W) && (h_from_base <= bar_rng[i])) begin
          if ((32'(x) == BAR_X[i]) || (32'(x) == BAR_X[i] + BAR_W - 1) || (h_from_base == bar_rng[i]))
            pix = COL_WHITE;
          else if (h_from_base < bar_val[i])
            pix = bar_col[i];
        end
      end
    end
  end

  logic [11:0] current_pixel;
  always_ff @(posedge clk) begin
    if (rst) begin
      current_pixel <= COL_BLACK;
      vga_hs        <= 1'b1;
      vga_vs        <= 1'b1;
    end else begin
      current_pixel <= bl_d[1] ? COL_BLACK : pix;
      vga_hs        <= hs_d[1];
      vga_vs        <= vs_d[1];
    end
  end

  assign {vga_r, vga_g, vga_b} = current_pixel;

endmodule
