// tb_sine_lut: compares all 256 entries with 32768 + 32767*sin(2*pi*i/256) computed with the
// simulator's real sine, allowing one LSB.
// The table is combinational and read 1 ns after each address. Its 256 x 16-bit size is the
// description's; the exact amplitude formula is this design's.
module tb_sine_lut;
  logic [7:0]  addr;
  logic [15:0] amp;
  int checks = 0, failures = 0;

  sine_lut dut (.addr_in(addr), .amp_out(amp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      real exp;
      addr = 8'(i);
      #1;
      exp = 32768.0 + 32767.0 * $sin(2.0 * 3.14159265358979 * i / 256.0);
      checks++;
      if (((real'(amp) > exp) ? real'(amp) - exp : exp - real'(amp)) > 1.0) begin
        failures++;
        $display("FAIL sine[%0d] = %0d, expected %f", i, amp, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
