// center_finder: centroid and area of one colour mask, once per camera frame.
//
// A four-state FSM, after the state diagram of the design description, watches the mask bit
// and the pixel indices. The finder runs on the system clock while pixels arrive far more
// slowly, so a pixel counts as new only when its indices differ from the ones seen on the
// previous clock.
//   INIT      sums and count cleared, indices remembered                  -> IDLE
//   IDLE      remember indices; at (MAX_V_IDX, MAX_H_IDX)                 -> DONE
//             new indices with pixel_in = 1                               -> NEW_PIXEL
//   NEW_PIXEL add h and v to their sums, count the pixel                  -> IDLE (or DONE)
//   DONE      divide both sums by the count (two seq_divider, 26 clocks),
//             register centre and area; at indices (0, 0)                 -> INIT
// MAX_V_IDX = 239 and MAX_H_IDX = 0 make the finder stop at the first pixel of the last row,
// as described, leaving a whole row of time for the division; the last row is not counted.
// Sums are 24 bits and the count 17 bits, as sized in the description. With an empty mask
// the centre reads 0. The pixel at (0, 0) is never counted, since INIT takes its indices as
// the ones already seen.
//
// Timing: result_valid pulses for one clock when the outputs change, 28 clocks after the
// frame's (MAX_V_IDX, MAX_H_IDX) pixel arrives. Pixels must stay at least two clocks apart.
module center_finder #(
  parameter logic [8:0] MAX_H_IDX = 9'd0,
  parameter logic [7:0] MAX_V_IDX = 8'd239
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pixel_in,
  input  logic [8:0]  h_index,
  input  logic [7:0]  v_index,
  output logic [8:0]  h_index_out,
  output logic [7:0]  v_index_out,
  output logic [16:0] area_out,
  output logic        result_valid
);

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_NEW_PIXEL, S_DONE} state_t;

  state_t      state;
  logic [23:0] h_sum, v_sum;
  logic [16:0] num_pixels;
  logic [8:0]  h_prev;
  logic [7:0]  v_prev;
  logic        div_start, div_pending;
  logic [23:0] h_quot, v_quot;
  logic        h_done, v_done;
  logic        at_end, at_start, is_new;

  assign at_end   = (v_index == MAX_V_IDX) && (h_index == MAX_H_IDX);
  assign at_start = (v_index == 8'd0) && (h_index == 9'd0);
  assign is_new   = (v_index != v_prev) || (h_index != h_prev);

  seq_divider #(.NUM_W(24), .DEN_W(17)) u_hdiv (
    .clk, .rst, .start(div_start), .dividend(h_sum), .divisor(num_pixels),
    .quotient(h_quot), .done(h_done), .busy()
  );

  seq_divider #(.NUM_W(24), .DEN_W(17)) u_vdiv (
    .clk, .rst, .start(div_start), .dividend(v_sum), .divisor(num_pixels),
    .quotient(v_quot), .done(v_done), .busy()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_INIT;
      h_sum        <= '0;
      v_sum        <= '0;
      num_pixels   <= '0;
      h_prev       <= '0;
      v_prev       <= '0;
      div_start    <= 1'b0;
      div_pending  <= 1'b0;
      h_index_out  <= '0;
      v_index_out  <= '0;
      area_out     <= '0;
      result_valid <= 1'b0;
    end else begin
      div_start    <= 1'b0;
      result_valid <= 1'b0;
      unique case (state)
        S_INIT: begin
          h_sum      <= '0;
          v_sum      <= '0;
          num_pixels <= '0;
          h_prev     <= h_index;
          v_prev     <= v_index;
          state      <= S_IDLE;
        end
        S_IDLE: begin
          h_prev <= h_index;
          v_prev <= v_index;
          if (at_end) begin
            div_start   <= 1'b1;
            div_pending <= 1'b1;
            state       <= S_DONE;
          end else if (is_new && pixel_in) begin
            state <= S_NEW_PIXEL;
          end
        end
        S_NEW_PIXEL: begin
          // the indices are still those of the pixel that was found new
          h_sum      <= h_sum + 24'(h_index);
          v_sum      <= v_sum + 24'(v_index);
          num_pixels <= num_pixels + 1'b1;
          h_prev     <= h_index;
          v_prev     <= v_index;
          state      <= S_IDLE;
        end
        default: begin  // S_DONE
          // both dividers start together and take the same number of clocks
          if (div_pending) begin
            if (h_done && v_done) begin
              div_pending  <= 1'b0;
              h_index_out  <= h_quot[8:0];
              v_index_out  <= v_quot[7:0];
              area_out     <= num_pixels;
              result_valid <= 1'b1;
            end
          end else if (at_start) begin
            state <= S_INIT;
          end
        end
      endcase
    end
  end

endmodule
