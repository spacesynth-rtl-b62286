// seq_divider: sequential unsigned restoring divider, one quotient bit per clock.
//
// start loads the operands; NUM_W iterations follow, and done pulses one clock after the last,
// so with the default 24-bit dividend a division takes 26 clocks from start to done, the
// figure the design description gives for its divider core. A zero divisor gives a zero
// quotient. Helper for center_finder.
module seq_divider #(
  parameter int unsigned NUM_W = 24,
  parameter int unsigned DEN_W = 17
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NUM_W-1:0] dividend,
  input  logic [DEN_W-1:0] divisor,
  output logic [NUM_W-1:0] quotient,
  output logic             done,
  output logic             busy
);

  localparam int unsigned CW = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q;
  logic [DEN_W:0]   rem;
  logic [DEN_W-1:0] den;
  logic [CW-1:0]    count;
  logic             finish;
  logic [DEN_W+1:0] trial;

  assign trial = {rem, q[NUM_W-1]} - {2'b00, den};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      finish   <= 1'b0;
      done     <= 1'b0;
      count    <= '0;
      q        <= '0;
      rem      <= '0;
      den      <= '0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        q     <= dividend;
        rem   <= '0;
        den   <= divisor;
        count <= CW'(NUM_W);
      end else if (busy) begin
        if (count != 0) begin
          count <= count - 1'b1;
          if (!trial[DEN_W+1]) begin
            rem <= trial[DEN_W:0];
            q   <= {q[NUM_W-2:0], 1'b1};
          end else begin
            rem <= {rem[DEN_W-1:0], q[NUM_W-1]};
            q   <= {q[NUM_W-2:0], 1'b0};
          end
          finish <= (count == 1);
        end else if (finish) begin
          finish   <= 1'b0;
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= (den == '0) ? '0 : q;
        end
      end
    end
  end

endmodule
