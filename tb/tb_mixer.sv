// tb_mixer: checks the mixer against (a/2 rounded down) + (b/2 rounded down) for corner values
// and random pairs, computed with integer floor division in the testbench.
// Combinational block: outputs are read 1 ns after each input change. The halve-and-add rule
// is the design description's.
module tb_mixer;
  logic signed [15:0] a, b, y;
  int checks = 0, failures = 0;

  mixer dut (.wave1_in(a), .wave2_in(b), .mixed_out(y));

  function automatic int floor_half(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  task automatic try(int va, int vb);
    int exp;
    a = 16'(va); b = 16'(vb);
    #1;
    exp = floor_half(va) + floor_half(vb);
    checks++;
    if (int'(y) != exp) begin
      failures++;
      $display("FAIL mixer %0d + %0d -> %0d, expected %0d", va, vb, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32767, 32767); try(-32768, -32768); try(-1, -1); try(1, -1); try(0, 0); try(-3, 5);
    for (int i = 0; i < 500; i++) try($signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
