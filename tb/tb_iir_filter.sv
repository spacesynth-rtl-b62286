// tb_iir_filter: feeds step, square and random inputs at several cutoffs and compares each
// output with a real-valued first-order low-pass using the quantised coefficients. The allowed
// error grows with the filter's noise gain 1/(1 - a1) to cover the RTL's truncations. Checks
// the DC gain after a long step and that out_valid follows sample_valid by exactly four clocks.
module tb_iir_filter;
  import audio_model_pkg::*;

  logic clk = 0, rst = 1, sv = 0;
  logic [7:0] cut;
  logic signed [15:0] x, y;
  logic ov;
  int checks = 0, failures = 0;

  iir_filter dut (.clk, .rst, .sample_valid(sv), .cutoff_in(cut), .waveform_in(x),
                  .filter_out(y), .out_valid(ov));

  always #5 clk = !clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ym, xp;

  task automatic sample(int xin, real b, real a, real tol);
    int lat;
    real ex;
    x  <= 16'(xin);
    sv <= 1;
    @(posedge clk);
    sv <= 0;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!ov && lat < 20);
    ex = a * ym + b * real'(xin) + b * xp;
    xp = real'(xin);
    ym = ex;
    checks++;
    if (lat != 4) begin
      failures++;
      $display("FAIL latency %0d, expected 4", lat);
    end
    checks++;
    if (absr(real'(y) - ex) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL cut=%0d in=%0d out=%0d expected %f", cut, xin, y, ex);
    end
    // the RTL's state is the authority for the next step
    ym = real'(y);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int cuts [4] = '{255, 128, 20, 0};
    x = 0; cut = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (cuts[n]) begin
      real b, a, tol;
      cut = 8'(cuts[n]);
      coefs(cuts[n], b, a);
      tol = 3.0;
      // settle at zero
      ym = real'(y); xp = 0.0;
      for (int k = 0; k < 3; k++) sample(0, b, a, 70000.0);
      ym = real'(y); xp = 0.0;
      for (int k = 0; k < 2500; k++) sample(10000, b, a, tol);
      checks++;
      if (absr(real'(y) - 10000.0) > 10.0 + 4.0 / (1.0 - a)) begin
        failures++;
        $display("FAIL cut=%0d DC gain: step 10000 settles at %0d", cuts[n], y);
      end
      for (int k = 0; k < 400; k++) sample(((k / 25) % 2) ? 16000 : -16000, b, a, tol);
      for (int k = 0; k < 400; k++) sample(int'($signed(16'($urandom))) / 2, b, a, tol);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
