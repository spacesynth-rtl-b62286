// tb_filter_coefs: compares all 256 coefficient sets with the first-order Butterworth
// low-pass (K = tan(pi*fc/48000), b = K/(1+K), a1 = (1-K)/(1+K), times 2**14) computed with
// real arithmetic, fc stepping linearly from 100 Hz to 5 kHz. One LSB is allowed.
module tb_filter_coefs;
  logic [7:0] idx;
  logic signed [15:0] b0, b1, a1;
  int checks = 0, failures = 0;

  filter_coefs dut (.cutoff_in(idx), .b0_out(b0), .b1_out(b1), .a1_out(a1));

  task automatic cmp(string what, int i, int got, real exp);
    checks++;
    if (((real'(got) > exp) ? real'(got) - exp : exp - real'(got)) > 1.0) begin
      failures++;
      $display("FAIL %s[%0d] = %0d, expected %f", what, i, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      real fc, k;
      idx = 8'(i);
      #1;
      fc = 100.0 + i * 4900.0 / 255.0;
      k  = $tan(3.14159265358979 * fc / 48000.0);
      cmp("b0", i, int'(b0), 16384.0 * k / (1.0 + k));
      cmp("b1", i, int'(b1), 16384.0 * k / (1.0 + k));
      cmp("a1", i, int'(a1), 16384.0 * (1.0 - k) / (1.0 + k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
