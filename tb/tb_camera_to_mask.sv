// tb_camera_to_mask: a full-size camera model (320 x 240) shows red, green and blue squares.
// After each frame the testbench checks the three centroids and areas against values computed
// from the squares (rows 0..238, pixel (0, 0) excluded, as center_finder specifies), and reads
// the four frame buffers at random positions, checking mask colours and the 12-bit raw pixel
// two clocks after the address. The squares move between frames; one square is made tiny and
// later hidden, and squares touch the frame corners.
module tb_camera_to_mask;
  import spacesynth_pkg::*;

  logic clk = 0, rst = 1;
  logic xclk, pclk, vsync, href;
  logic [7:0] data;
  logic [16:0] ra, ga, ba, wa;
  logic [11:0] rb, gb, bb, wb;
  blob_t red, green, blue;
  logic bv;
  int frames;
  int checks = 0, failures = 0;
  int rx, ry, rs, gx, gy, gs, bx, by, bs;          // squares being sent
  int crx, cry, crs, cgx, cgy, cgs, cbx, cby, cbs; // squares of the finished frame

  always #5 clk = !clk;

  cam_model cam (.xclk, .pclk, .vsync, .href, .data,
                 .red_x(rx), .red_y(ry), .red_size(rs), .green_x(gx), .green_y(gy), .green_size(gs),
                 .blue_x(bx), .blue_y(by), .blue_size(bs), .frame_count(frames));

  camera_to_mask dut (.clk, .rst, .cam_xclk(xclk), .cam_pclk(pclk), .cam_vsync(vsync),
                      .cam_href(href), .cam_data(data), .threshold_sel(4'b0000),
                      .red_addr(ra), .green_addr(ga), .blue_addr(ba), .raw_addr(wa),
                      .red_buff_out(rb), .green_buff_out(gb), .blue_buff_out(bb),
                      .raw_image_buff_out(wb), .red_blob(red), .green_blob(green),
                      .blue_blob(blue), .blobs_valid(bv));

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // colour of pixel (x, y) of the finished frame (same drawing rule as cam_model)
  function automatic logic [15:0] pix_of(int x, int y);
    if (x >= crx && x < crx + crs && y >= cry && y < cry + crs) return 16'hF800;
    if (x >= cgx && x < cgx + cgs && y >= cgy && y < cgy + cgs) return 16'h07E0;
    if (x >= cbx && x < cbx + cbs && y >= cby && y < cby + cbs) return 16'h001F;
    return 16'h2104;
  endfunction

  task automatic check_blob(string name, blob_t b, logic [15:0] colour);
    longint hs, vs, n;
    hs = 0; vs = 0; n = 0;
    for (int y = 0; y < 239; y++)
      for (int x = 0; x < 320; x++)
        if (!(x == 0 && y == 0) && pix_of(x, y) == colour) begin
          hs += x; vs += y; n++;
        end
    checks++;
    if (32'(b.area) != n || (n != 0 && (32'(b.h) != hs / n || 32'(b.v) != vs / n))) begin
      failures++;
      $display("FAIL %s blob (%0d,%0d) area %0d, expected (%0d,%0d) %0d", name, b.h, b.v, b.area,
               (n != 0) ? hs / n : 0, (n != 0) ? vs / n : 0, n);
    end
  endtask

  task automatic check_buffers();
    for (int k = 0; k < 60; k++) begin
      int x, y, a;
      logic [15:0] p;
      x = $urandom_range(0, 319);
      y = $urandom_range(10, 239);
      if (k < 20 && crs > 0) begin x = crx + k % crs; y = cry + k % crs; end  // red square
      if (y < 10 || y > 239 || x > 319) continue;  // rows 0..9 are already being rewritten
      a = y * 320 + x;
      p = pix_of(x, y);
      @(negedge clk);
      ra = 17'(a); ga = 17'(a); ba = 17'(a); wa = 17'(a);
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (rb != ((p == 16'hF800) ? 12'hF00 : 12'h000) || gb != ((p == 16'h07E0) ? 12'h0F0 : 12'h000) ||
          bb != ((p == 16'h001F) ? 12'h00F : 12'h000) || wb != {p[15:12], p[10:7], p[4:1]}) begin
        failures++;
        if (failures < 10)
          $display("FAIL buffers at (%0d,%0d): %h %h %h raw %h, pixel %h", x, y, rb, gb, bb, wb, p);
      end
    end
  endtask

  initial begin
    ra = 0; ga = 0; ba = 0; wa = 0;
    rx = 50;  ry = 60;  rs = 20;
    gx = 200; gy = 100; gs = 30;
    bx = 270; by = 180; bs = 10;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 1; f <= 4; f++) begin
      wait (frames == f);
      // the squares move for the next frame at once; the checks use the finished frame
      crx = rx; cry = ry; crs = rs; cgx = gx; cgy = gy; cgs = gs; cbx = bx; cby = by; cbs = bs;
      case (f)
        1: begin rx = 0;   ry = 0;   rs = 25; gx = 300; gy = 220; gs = 20; bx = 100; by = 100; bs = 3; end
        2: begin rx = 160; ry = 120; rs = 40; gx = 10;  gy = 200; gs = 15; bx = 0;   by = 0;   bs = 0; end
        default: begin rx = 5; ry = 230; rs = 12; gx = 290; gy = 5; gs = 30; bx = 140; by = 30; bs = 25; end
      endcase
      repeat (200) @(posedge clk);
      check_blob("red", red, 16'hF800);
      check_blob("green", green, 16'h07E0);
      check_blob("blue", blue, 16'h001F);
      check_buffers();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
