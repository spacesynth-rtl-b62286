// tb_center_finder: plays eight full 320 x 240 frames of indices into the finder, one pixel
// every four clocks: random masks, squares, an empty frame, a full frame (largest sums) and a
// single pixel. Checks centre and area against sums taken in the testbench over the pixels the
// finder is specified to count (rows 0..238, the pixel at (0, 0) excluded), exactly one result
// pulse per frame, and that the result arrives 28 clocks after the first pixel of row 239.
// The early stop and the divider sizes are the design description's; the 28-clock figure is
// this implementation's (26-clock divider plus two).
module tb_center_finder;
  logic clk = 0, rst = 1;
  logic pin;
  logic [8:0] hi;
  logic [7:0] vi;
  logic [8:0] ho;
  logic [7:0] vo;
  logic [16:0] area;
  logic rv;
  int checks = 0, failures = 0;

  center_finder dut (.clk, .rst, .pixel_in(pin), .h_index(hi), .v_index(vi), .h_index_out(ho),
                     .v_index_out(vo), .area_out(area), .result_valid(rv));

  always #5 clk = !clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, end_cyc = 0, rv_cyc = 0, rv_count = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rv) begin rv_cyc <= cyc; rv_count <= rv_count + 1; end
  end

  initial begin
    pin = 0; hi = 0; vi = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 8; f++) begin
      longint hs, vs, n;
      int sx, sy, sz, rv0;
      hs = 0; vs = 0; n = 0;
      sz = $urandom_range(1, 120); sx = $urandom_range(0, 319 - sz); sy = $urandom_range(0, 239 - sz);
      rv0 = rv_count;
      for (int y = 0; y < 240; y++)
        for (int x = 0; x < 320; x++) begin
          bit m;
          if (f == 0)      m = ($urandom_range(0, 9) == 0);
          else if (f == 1) m = (x >= 100 && x < 140 && y >= 50 && y < 90);
          else if (f == 2) m = (x < 20 && y < 20) || (x >= 300 && y >= 230);
          else if (f == 3) m = 0;                                   // empty frame
          else if (f == 4) m = 1;                                   // full frame, largest sums
          else if (f == 5) m = (x >= sx && x < sx + sz && y >= sy && y < sy + sz);
          else if (f == 6) m = ($urandom_range(0, 1) == 0);
          else             m = (x == 319 && y == 238);              // one pixel, far corner
          @(negedge clk);
          pin = m; hi = 9'(x); vi = 8'(y);
          if (x == 0 && y == 239) end_cyc = cyc;
          if (m && y < 239 && !(x == 0 && y == 0)) begin hs += x; vs += y; n++; end
          repeat (3) @(negedge clk);
        end
      // next frame starts at (0, 0)
      @(negedge clk); hi = 0; vi = 0; pin = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (32'(area) != n || 32'(ho) != ((n == 0) ? 0 : hs / n) || 32'(vo) != ((n == 0) ? 0 : vs / n)) begin
        failures++;
        $display("FAIL frame %0d: centre (%0d,%0d) area %0d, expected (%0d,%0d) %0d", f, ho, vo, area,
                 (n == 0) ? 0 : hs / n, (n == 0) ? 0 : vs / n, n);
      end
      checks++;
      if (rv_count - rv0 != 1) begin
        failures++;
        $display("FAIL frame %0d: %0d result pulses", f, rv_count - rv0);
      end
      checks++;
      if (rv_cyc - end_cyc != 28) begin
        failures++;
        $display("FAIL result %0d clocks after the end pixel, expected 28", rv_cyc - end_cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
