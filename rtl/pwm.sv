// pwm: ramp-compare pulse-width modulator for the audio output.
//
// A 16-bit ramp advances by 256 every clock (a 256-clock period, about 254 kHz at 65 MHz) and is
// compared with the unsigned audio level. While the ramp is below the level the pin is
// released (the board's low-pass filter sees high impedance); otherwise it is driven
// low. This follows the design description. The pad itself is open-drain: pwm_release = 1
// means "high impedance", 0 means "drive 0"; the tristate buffer belongs to the pad ring.
// A ramp equal to the level drives low (own choice).
//
// Timing: pwm_release is registered, one clock after the ramp value it reflects.
module pwm (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] level_in,     // unsigned audio sample
  output logic        pwm_release   // 1 = high impedance, 0 = pulled low
);

  logic [15:0] ramp;

  always_ff @(posedge clk) begin
    if (rst) begin
      ramp        <= '0;
      pwm_release <= 1'b0;
    end else begin
      ramp        <= ramp + 16'd256;
      pwm_release <= (ramp < level_in);
    end
  end

endmodule
