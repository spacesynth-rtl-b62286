// xvga: 1024 x 768 at 60 Hz VGA timing for a 65 MHz pixel clock.
//
// hcount runs 0..1343 and vcount 0..805; pixels 0..1023 x 0..767 are visible and blank is high
// elsewhere. hsync is low for hcount 1048..1183 and vsync low for vcount 771..776 (front porch
// 24/3, sync 136/6, back porch 160/29). The design description only names this generator and
// its 1024 x 768 format; the porch and sync numbers are the standard VESA timing for that
// mode. All outputs are registered and mutually aligned.
module xvga (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);

  localparam int unsigned H_VIS = 1024, H_FP = 24, H_SYNC = 136, H_BP = 160;
  localparam int unsigned V_VIS = 768,  V_FP = 3,  V_SYNC = 6,   V_BP = 29;
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;  // 1344
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;  // 806

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (hcount == 11'(H_TOT - 1)) ? 11'd0 : hcount + 1'b1;
    v_next = vcount;
    if (hcount == 11'(H_TOT - 1)) v_next = (vcount == 10'(V_TOT - 1)) ? 10'd0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !((h_next >= 11'(H_VIS + H_FP)) && (h_next < 11'(H_VIS + H_FP + H_SYNC)));
      vsync  <= !((v_next >= 10'(V_VIS + V_FP)) && (v_next < 10'(V_VIS + V_FP + V_SYNC)));
      blank  <= (h_next >= 11'(H_VIS)) || (v_next >= 10'(V_VIS));
    end
  end

endmodule
