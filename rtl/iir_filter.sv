// iir_filter: first-order IIR low-pass, y[n] = a1*y[n-1] + b0*x[n] + b1*x[n-1].
//
// One 16x16 signed multiplier is shared by the three terms under a five-state FSM, following
// the state diagram of the design description:
//   IDLE    on sample_valid: sum <= 0, mult1 <= b0, mult2 <= waveform_in
//   B0      sum += product, mult1 <= b1, mult2 <= previous input
//   B1      sum += product, mult1 <= a1, mult2 <= previous output
//   A1      sum += product
//   DONE    filter_out <= {sum[31], sum[15:1]}; previous input/output updated; back to IDLE
// Coefficients are Q14 numbers from filter_coefs, latched with each new sample so the cutoff
// can change at any time. Each product is shifted right by 13 before it is accumulated, so the
// sum carries the output with one extra fraction bit, and {sum[31], sum[15:1]} removes it. That
// shift amount is this implementation's choice: it is the one under which the printed output
// selection gives unity DC gain. The previous output used by the recursion is filter_out.
//
// Timing: out_valid pulses with a new filter_out four clocks after sample_valid. Samples must
// be at least five clocks apart (at 65 MHz and 48 kHz they are about 1354 apart).
module iir_filter (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_valid,
  input  logic [7:0]         cutoff_in,
  input  logic signed [15:0] waveform_in,
  output logic signed [15:0] filter_out,
  output logic               out_valid
);

  typedef enum logic [2:0] {S_IDLE, S_B0, S_B1, S_A1, S_DONE} state_t;

  state_t              state;
  logic signed [15:0]  b0, b1, a1;
  logic signed [15:0]  b1_q, a1_q;
  logic signed [15:0]  mult1, mult2;
  logic signed [31:0]  mult_out;
  logic signed [31:0]  sum;
  logic signed [15:0]  x_cur, x_prev;

  filter_coefs u_coefs (.cutoff_in(cutoff_in), .b0_out(b0), .b1_out(b1), .a1_out(a1));

  assign mult_out = mult1 * mult2;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      sum        <= '0;
      mult1      <= '0;
      mult2      <= '0;
      b1_q       <= '0;
      a1_q       <= '0;
      x_cur      <= '0;
      x_prev     <= '0;
      filter_out <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (sample_valid) begin
          sum   <= '0;
          mult1 <= b0;
          mult2 <= waveform_in;
          x_cur <= waveform_in;
          b1_q  <= b1;
          a1_q  <= a1;
          state <= S_B0;
        end
        S_B0: begin
          sum   <= sum + (mult_out >>> 13);
          mult1 <= b1_q;
          mult2 <= x_prev;
          state <= S_B1;
        end
        S_B1: begin
          sum   <= sum + (mult_out >>> 13);
          mult1 <= a1_q;
          mult2 <= filter_out;
          state <= S_A1;
        end
        S_A1: begin
          sum   <= sum + (mult_out >>> 13);
          state <= S_DONE;
        end
        default: begin
          filter_out <= {sum[31], sum[15:1]};
          x_prev     <= x_cur;
          out_valid  <= 1'b1;
          state      <= S_IDLE;
        end
      endcase
    end
  end

endmodule
