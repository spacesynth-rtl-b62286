// tb_camera_read: a small camera model (8 x 4 pixels) feeds the reader; every reported pixel
// is checked against the model's picture, its address and its indices, the pixel count per
// frame and the frame_done pulse per frame are checked over three frames.
module tb_camera_read;
  logic clk = 0, rst = 1;
  logic pclk, vsync, href;
  logic [7:0] data;
  logic [15:0] pix;
  logic pv, fd;
  logic [16:0] addr;
  logic [8:0] hi;
  logic [7:0] vi;
  int frames;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  cam_model #(.W(8), .H(4), .HB_CLKS(5), .VS_CLKS(6), .VB_CLKS(4)) cam (
    .xclk(clk), .pclk, .vsync, .href, .data,
    .red_x(1), .red_y(1), .red_size(2), .green_x(5), .green_y(0), .green_size(3),
    .blue_x(0), .blue_y(3), .blue_size(8), .frame_count(frames));

  camera_read dut (.p_clock(pclk), .rst, .vsync_in(vsync), .href_in(href), .p_data_in(data),
                   .pixel_data_out(pix), .pixel_valid_out(pv), .frame_done_out(fd),
                   .pixel_addr_out(addr), .h_idx_out(hi), .v_idx_out(vi));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int count = 0, dones = 0;
  always @(posedge clk) if (!rst) begin
    if (pv) begin
      int x, y;
      x = count % 8; y = count / 8;
      checks++;
      if (pix != cam.pixel(x, y) || 32'(addr) != count || 32'(hi) != x || 32'(vi) != y) begin
        failures++;
        $display("FAIL pixel %0d: %h addr %0d h %0d v %0d, expected %h", count, pix, addr, hi, vi,
                 cam.pixel(x, y));
      end
      count++;
    end
    if (fd) begin
      dones++;
      if (dones > 1) begin
        checks++;
        if (count != 32) begin failures++; $display("FAIL %0d pixels in a frame", count); end
      end
      count = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (frames == 4);
    repeat (20) @(posedge clk);
    checks++;
    if (dones < 4) begin failures++; $display("FAIL %0d frame_done pulses", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
