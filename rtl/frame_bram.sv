// frame_bram: dual-port frame buffer (one camera frame), write on port A, read on port B.
//
// Port A writes din_a at addr_a when we_a is high. Port B reads addr_b with two clocks of
// latency (registered address, registered data); the description gives the buffer sizes but
// no latency, so two clocks is this implementation's choice. Both ports run on the system clock. Used as the 1 x 76800
// red, green and blue mask buffers and the 12 x 76800 raw image buffer. Written as an array
// so synthesis maps it to block RAM.
module frame_bram #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 76800,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] din_a,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    addr_b_q;

  always_ff @(posedge clk) begin
    if (we_a && (32'(addr_a) < DEPTH)) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk) begin
    addr_b_q <= addr_b;
    dout_b   <= (32'(addr_b_q) < DEPTH) ? mem[addr_b_q] : '0;
  end

endmodule
