// rgb_2_hsv: pipelined RGB to HSV colour-space converter, one pixel per clock, 22 clocks latency.
//
// With max/min the largest/smallest of r, g, b and delta = max - min:
//   v = max
//   s = 255 * delta / max                          (0 when max = 0)
//   h = base + 43 * (x - y) / delta  (mod 256)     (0 when delta = 0)
// where base, x, y are 0, g, b when red is largest, 85, b, r when green is largest, and
// 171, r, g when blue is largest (hue 0..255 stands for 0..360 degrees).
// Stage 1 finds max, min and the hue numerator; two pipe_divider instances (16 stages each)
// form the hue fraction and the saturation; stage 18 combines them; four delay stages bring
// the total to the 22 clocks the design description gives for its converter. The
// description names the block and its latency but not its arithmetic: the formulas above are
// the conventional 8-bit HSV definition, chosen here.
module rgb_2_hsv (
  input  logic       clk,
  input  logic       rst,        // clears the valid flags only
  input  logic       valid_in,
  input  logic [7:0] r_in,
  input  logic [7:0] g_in,
  input  logic [7:0] b_in,
  output logic       valid_out,
  output logic [7:0] h_out,
  output logic [7:0] s_out,
  output logic [7:0] v_out
);

  localparam int unsigned LATENCY = 22;
  localparam int unsigned DIV_W   = 16;
  localparam int unsigned PAD     = LATENCY - DIV_W - 2;

  // ---- stage 1: max, min, numerators
  logic [7:0] mx, mn, dl, hue_base;
  logic [8:0] hue_diff;        // signed difference x - y, two's complement
  logic       hue_neg;
  logic [7:0] hue_mag;

  always_comb begin
    mx = (r_in >= g_in) ? ((r_in >= b_in) ? r_in : b_in) : ((g_in >= b_in) ? g_in : b_in);
    mn = (r_in <= g_in) ? ((r_in <= b_in) ? r_in : b_in) : ((g_in <= b_in) ? g_in : b_in);
    dl = mx - mn;
    if (mx == r_in) begin
      hue_base = 8'd0;
      hue_diff = {1'b0, g_in} - {1'b0, b_in};
    end else if (mx == g_in) begin
      hue_base = 8'd85;
      hue_diff = {1'b0, b_in} - {1'b0, r_in};
    end else begin
      hue_base = 8'd171;
      hue_diff = {1'b0, r_in} - {1'b0, g_in};
    end
    hue_neg = hue_diff[8];
    hue_mag = hue_neg ? 8'(-hue_diff) : hue_diff[7:0];
  end

  logic        s1_valid;
  logic [15:0] s1_hnum, s1_snum;
  logic [7:0]  s1_dl, s1_mx;
  logic [7:0]  s1_base;
  logic        s1_neg;

  always_ff @(posedge clk) begin
    s1_valid <= rst ? 1'b0 : valid_in;
    s1_hnum  <= 16'(hue_mag) * 16'd43;
    s1_snum  <= 16'(dl) * 16'd255;
    s1_dl    <= dl;
    s1_mx    <= mx;
    s1_base  <= hue_base;
    s1_neg   <= hue_neg;
  end

  // ---- stages 2..17: the two divisions
  typedef struct packed {
    logic [7:0] v;
    logic [7:0] base;
    logic       neg;
    logic       zero_delta;
    logic       zero_max;
  } side_t;

  side_t       side_in, side_out, side_unused;
  logic        d_valid, d_valid_unused;
  logic [15:0] hq, sq;

  assign side_in = '{v: s1_mx, base: s1_base, neg: s1_neg,
                     zero_delta: (s1_dl == 8'd0), zero_max: (s1_mx == 8'd0)};

  pipe_divider #(.NUM_W(DIV_W), .DEN_W(8), .SIDE_W($bits(side_t))) u_hdiv (
    .clk, .rst, .valid_in(s1_valid), .num_in(s1_hnum), .den_in(s1_dl), .side_in(side_in),
    .valid_out(d_valid), .quot_out(hq), .side_out(side_out)
  );

  pipe_divider #(.NUM_W(DIV_W), .DEN_W(8), .SIDE_W($bits(side_t))) u_sdiv (
    .clk, .rst, .valid_in(s1_valid), .num_in(s1_snum), .den_in(s1_mx), .side_in(side_in),
    .valid_out(d_valid_unused), .quot_out(sq), .side_out(side_unused)
  );

  // ---- stage 18: combine
  logic       s3_valid;
  logic [7:0] s3_h, s3_s, s3_v;

  always_ff @(posedge clk) begin
    s3_valid <= rst ? 1'b0 : d_valid;
    s3_v     <= side_out.v;
    s3_s     <= side_out.zero_max ? 8'd0 : sq[7:0];
    if (side_out.zero_delta)  s3_h <= 8'd0;
    else if (side_out.neg)    s3_h <= side_out.base - hq[7:0];
    else                      s3_h <= side_out.base + hq[7:0];
  end

  // ---- stages 19..22: delay to the fixed latency
  logic [24:0] dly [PAD+1];
  assign dly[0] = {s3_valid, s3_h, s3_s, s3_v};
  for (genvar i = 0; i < PAD; i++) begin : g_pad
    always_ff @(posedge clk) dly[i+1] <= rst ? '0 : dly[i];
  end
  assign {valid_out, h_out, s_out, v_out} = dly[PAD];

endmodule
