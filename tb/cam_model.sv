// cam_model: behavioural model of the OV7670-style camera for simulation only.
//
// Sends frames of W x H RGB565 pixels, two bytes per pixel (high byte first), on its pixel
// clock, which is the xclk it receives. Each frame starts with VS_CLKS pixel clocks of vsync,
// then VB_CLKS idle clocks; each line has href high for 2*W clocks and low for HB_CLKS clocks.
// Data changes on the falling edge of pclk. The picture is a dark grey background with up to
// three coloured squares (red, green, blue, drawn in that priority), whose corners and sizes
// are inputs; a size of 0 hides a square. frame_count counts completed frames.
module cam_model #(
  parameter int W       = 320,
  parameter int H       = 240,
  parameter int HB_CLKS = 16,
  parameter int VS_CLKS = 40,
  parameter int VB_CLKS = 40
) (
  input  logic       xclk,
  output logic       pclk,
  output logic       vsync,
  output logic       href,
  output logic [7:0] data,
  input  int         red_x, red_y, red_size,
  input  int         green_x, green_y, green_size,
  input  int         blue_x, blue_y, blue_size,
  output int         frame_count
);

  assign pclk = xclk;

  function automatic logic [15:0] pixel(int x, int y);
    if (x >= red_x && x < red_x + red_size && y >= red_y && y < red_y + red_size)
      return 16'hF800;
    if (x >= green_x && x < green_x + green_size && y >= green_y && y < green_y + green_size)
      return 16'h07E0;
    if (x >= blue_x && x < blue_x + blue_size && y >= blue_y && y < blue_y + blue_size)
      return 16'h001F;
    return 16'h2104;
  endfunction

  initial begin
    vsync = 0; href = 0; data = 0; frame_count = 0;
    forever begin
      repeat (VS_CLKS) begin @(negedge pclk); vsync = 1; end
      repeat (VB_CLKS) begin @(negedge pclk); vsync = 0; end
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          logic [15:0] p;
          p = pixel(x, y);
          @(negedge pclk); href = 1; data = p[15:8];
          @(negedge pclk); href = 1; data = p[7:0];
        end
        repeat (HB_CLKS) begin @(negedge pclk); href = 0; data = 0; end
      end
      frame_count++;
    end
  end

endmodule
