// tb_frame_bram: writes random words to random addresses of a full 12 x 76800 buffer, keeps a
// copy in the testbench, and reads them back checking the two-clock read latency; also reads
// while writing to other addresses.
module tb_frame_bram;
  logic clk = 0;
  logic we;
  logic [16:0] wa, ra;
  logic [11:0] wd, rd;
  int checks = 0, failures = 0;
  logic [11:0] ref_mem [int];

  frame_bram #(.WIDTH(12), .DEPTH(76800)) dut (.clk, .we_a(we), .addr_a(wa), .din_a(wd),
                                             .addr_b(ra), .dout_b(rd));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addrs [$];
    we = 0; wa = 0; wd = 0; ra = 0;
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(0, 76799);
      @(posedge clk);
      we <= 1; wa <= 17'(a); wd <= 12'($urandom);
      @(posedge clk); #1;
      ref_mem[a] = wd;
      addrs.push_back(a);
      we <= 0;
    end
    foreach (addrs[i]) begin
      @(posedge clk);
      ra <= 17'(addrs[i]);
      // unrelated write on port A at the same time
      we <= 1; wa <= 17'(76799 - (i % 100)); wd <= 12'hABC;
      @(posedge clk);
      we <= 0; ra <= 17'($urandom_range(0, 76799));
      @(posedge clk); #1;
      checks++;
      if (rd != ref_mem[addrs[i]] && (addrs[i] < 76700)  /* the top 100 words are overwritten above */) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d read %h expected %h", addrs[i], rd, ref_mem[addrs[i]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
