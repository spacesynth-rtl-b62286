// tb_rgb_2_hsv: streams one pixel per clock (primary colours, greys and random values) and
// checks each HSV result, 22 clocks later, against the 8-bit HSV formulas evaluated in the
// testbench with real arithmetic (hue truncated toward zero before the sector offset).
module tb_rgb_2_hsv;
  logic clk = 0, rst = 1, vin = 0, vout;
  logic [7:0] r, g, b, h, s, v;
  int checks = 0, failures = 0;

  rgb_2_hsv dut (.clk, .rst, .valid_in(vin), .r_in(r), .g_in(g), .b_in(b), .valid_out(vout),
                 .h_out(h), .s_out(s), .v_out(v));

  always #5 clk = !clk;

  typedef struct { int h; int s; int v; } hsv_t;
  hsv_t q [$];
  int sent_at [$];
  int cyc = 0;

  function automatic hsv_t model(int rr, int gg, int bb);
    hsv_t o;
    int mx, mn, d;
    real frac;
    mx = (rr > gg) ? rr : gg; mx = (bb > mx) ? bb : mx;
    mn = (rr < gg) ? rr : gg; mn = (bb < mn) ? bb : mn;
    d = mx - mn;
    o.v = mx;
    o.s = (mx == 0) ? 0 : int'($floor(255.0 * d / mx));
    if (d == 0) o.h = 0;
    else begin
      if (mx == rr)      frac = 43.0 * (gg - bb) / d;
      else if (mx == gg) frac = 43.0 * (bb - rr) / d;
      else               frac = 43.0 * (rr - gg) / d;
      frac = (frac < 0) ? -$floor(-frac) : $floor(frac);
      o.h = ((mx == rr) ? 0 : (mx == gg) ? 85 : 171) + int'(frac);
      o.h = (o.h + 256) % 256;
    end
    return o;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (vin) begin q.push_back(model(r, g, b)); sent_at.push_back(cyc); end
    if (vout) begin
      hsv_t e;
      e = q.pop_front();
      checks++;
      if (h != 8'(e.h) || s != 8'(e.s) || v != 8'(e.v)) begin
        failures++;
        if (failures < 10) $display("FAIL hsv %0d %0d %0d expected %0d %0d %0d", h, s, v, e.h, e.s, e.v);
      end
      checks++;
      if (cyc - sent_at[0] != 22) begin
        failures++;
        $display("FAIL latency %0d", cyc - sent_at[0]);
      end
      void'(sent_at.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fixed [6][3] = '{'{248, 0, 0}, '{0, 252, 0}, '{0, 0, 248}, '{0, 0, 0}, '{128, 128, 128},
                         '{255, 10, 200}};
    r = 0; g = 0; b = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (30) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      if (n < 6) begin r <= 8'(fixed[n][0]); g <= 8'(fixed[n][1]); b <= 8'(fixed[n][2]); end
      else begin r <= 8'($urandom); g <= 8'($urandom); b <= 8'($urandom); end
      vin <= (n % 5 != 4);
    end
    @(posedge clk); vin <= 0;
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
