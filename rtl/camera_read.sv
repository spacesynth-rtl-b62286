// camera_read: assembles pixels from the camera's 8-bit parallel bus.
//
// The camera sends each RGB565 pixel as two bytes, high byte first, on rising edges of its
// pixel clock while href is high; vsync high marks the gap between frames. This block pairs
// the bytes and reports, for each pixel, its 16-bit value, its frame-buffer address
// (row-major, 0..76799) and its horizontal and vertical index, with a one-clock pixel_valid.
// frame_done pulses when vsync rises after a frame. The design description takes this reader
// from existing camera code and lists its outputs (pixel, address, x/y index, new-pixel and
// frame-done flags); this is a plain implementation of that behaviour. The row index advances
// on each falling edge of href; everything runs on the camera pixel clock.
module camera_read (
  input  logic        p_clock,
  input  logic        rst,
  input  logic        vsync_in,
  input  logic        href_in,
  input  logic [7:0]  p_data_in,
  output logic [15:0] pixel_data_out,
  output logic        pixel_valid_out,
  output logic        frame_done_out,
  output logic [16:0] pixel_addr_out,
  output logic [8:0]  h_idx_out,
  output logic [7:0]  v_idx_out
);

  logic        second_byte;
  logic [7:0]  high_byte;
  logic        href_q, vsync_q;
  logic [16:0] addr;
  logic [8:0]  h_cnt;
  logic [7:0]  v_cnt;

  always_ff @(posedge p_clock) begin
    if (rst) begin
      second_byte     <= 1'b0;
      high_byte       <= '0;
      href_q          <= 1'b0;
      vsync_q         <= 1'b0;
      addr            <= '0;
      h_cnt           <= '0;
      v_cnt           <= '0;
      pixel_data_out  <= '0;
      pixel_valid_out <= 1'b0;
      frame_done_out  <= 1'b0;
      pixel_addr_out  <= '0;
      h_idx_out       <= '0;
      v_idx_out       <= '0;
    end else begin
      href_q          <= href_in;
      vsync_q         <= vsync_in;
      pixel_valid_out <= 1'b0;
      frame_done_out  <= vsync_in && !vsync_q;
      if (vsync_in) begin
        second_byte <= 1'b0;
        addr        <= '0;
        h_cnt       <= '0;
        v_cnt       <= '0;
      end else if (href_in) begin
        second_byte <= !second_byte;
        if (!second_byte) begin
          high_byte <= p_data_in;
        end else begin
          pixel_data_out  <= {high_byte, p_data_in};
          pixel_valid_out <= 1'b1;
          pixel_addr_out  <= addr;
          h_idx_out       <= h_cnt;
          v_idx_out       <= v_cnt;
          addr            <= addr + 1'b1;
          h_cnt           <= h_cnt + 1'b1;
        end
      end else if (href_q) begin
        // end of a line
        second_byte <= 1'b0;
        h_cnt       <= '0;
        v_cnt       <= v_cnt + 1'b1;
      end
    end
  end

endmodule
