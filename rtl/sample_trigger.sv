// sample_trigger: the audio sample strobe.
//
// Divides the system clock down to the sample rate and emits a one-clock pulse per sample.
// With the defaults (65 MHz, 48 kHz) the period is round(65e6 / 48e3) = 1354 clocks, i.e. an
// actual rate of 48006 Hz. The design description names this 48 kHz trigger; the counter is
// this implementation's.
module sample_trigger
  import spacesynth_pkg::*;
#(
  parameter int unsigned CLK_HZ  = SYS_CLK_HZ,
  parameter int unsigned RATE_HZ = SAMPLE_HZ
) (
  input  logic clk,
  input  logic rst,
  output logic trigger_out
);

  localparam int unsigned PERIOD = (CLK_HZ + RATE_HZ / 2) / RATE_HZ;
  localparam int unsigned CW     = $clog2(PERIOD);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count       <= '0;
      trigger_out <= 1'b0;
    end else if (count == CW'(PERIOD - 1)) begin
      count       <= '0;
      trigger_out <= 1'b1;
    end else begin
      count       <= count + 1'b1;
      trigger_out <= 1'b0;
    end
  end

endmodule
