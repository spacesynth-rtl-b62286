// pipe_divider: fully pipelined unsigned restoring divider.
//
// One quotient bit is produced per stage, most significant first, so a new division can
// start every clock and its result appears NUM_W clocks later. A side-band word travels with
// each division so callers can keep per-sample data aligned. Division by zero yields an
// all-ones quotient. Helper for rgb_2_hsv.
module pipe_divider #(
  parameter int unsigned NUM_W  = 16,
  parameter int unsigned DEN_W  = 8,
  parameter int unsigned SIDE_W = 1
) (
  input  logic              clk,
  input  logic              rst,          // clears the valid flags only
  input  logic              valid_in,
  input  logic [NUM_W-1:0]  num_in,
  input  logic [DEN_W-1:0]  den_in,
  input  logic [SIDE_W-1:0] side_in,
  output logic              valid_out,
  output logic [NUM_W-1:0]  quot_out,
  output logic [SIDE_W-1:0] side_out
);

  // stage s holds the partial remainder after s quotient bits
  logic              v   [NUM_W+1];
  logic [NUM_W-1:0]  num [NUM_W+1];   // dividend bits still to be shifted in, and quotient
  logic [DEN_W:0]    rem [NUM_W+1];
  logic [DEN_W-1:0]  den [NUM_W+1];
  logic [SIDE_W-1:0] sd  [NUM_W+1];

  assign v[0]   = valid_in;
  assign num[0] = num_in;
  assign rem[0] = '0;
  assign den[0] = den_in;
  assign sd[0]  = side_in;

  for (genvar s = 0; s < NUM_W; s++) begin : g_stage
    logic [DEN_W+1:0] trial;
    assign trial = {rem[s], num[s][NUM_W-1]} - {2'b00, den[s]};
    always_ff @(posedge clk) begin
      v[s+1]   <= rst ? 1'b0 : v[s];
      den[s+1] <= den[s];
      sd[s+1]  <= sd[s];
      if (!trial[DEN_W+1]) begin
        rem[s+1] <= trial[DEN_W:0];
        num[s+1] <= {num[s][NUM_W-2:0], 1'b1};
      end else begin
        rem[s+1] <= {rem[s][DEN_W-1:0], num[s][NUM_W-1]};
        num[s+1] <= {num[s][NUM_W-2:0], 1'b0};
      end
    end
  end

  assign valid_out = v[NUM_W];
  assign quot_out  = num[NUM_W];
  assign side_out  = sd[NUM_W];

endmodule
