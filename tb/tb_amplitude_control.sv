// tb_amplitude_control: checks every shift amount against floor(x / 2**shift), computed with
// real arithmetic in the testbench.
// The block is combinational: each input is applied, 1 ns is allowed, and the output read.
// The shift-per-6-dB behaviour is the design description's; the random stimulus is mine.
module tb_amplitude_control;
  logic signed [15:0] x, y;
  logic [3:0] s;
  int checks = 0, failures = 0;

  amplitude_control dut (.signal_in(x), .shift_in(s), .signal_out(y));

  task automatic try(int vx, int vs);
    int exp;
    x = 16'(vx); s = 4'(vs);
    #1;
    exp = int'($floor(real'(vx) / (2.0 ** vs)));
    checks++;
    if (int'(y) != exp) begin
      failures++;
      $display("FAIL %0d >>> %0d -> %0d, expected %0d", vx, vs, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sh = 0; sh < 16; sh++) begin
      try(32767, sh); try(-32768, sh); try(-1, sh); try(12345, sh);
      for (int i = 0; i < 30; i++) try($signed(16'($urandom)), sh);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
