// Self-checking test of svpwm at its default 20 kHz carrier (10000 clocks per
// period at 200 MHz). For vectors around the circle, the expected on-times
// are worked out here with real arithmetic (inverse Clarke, min-max offset);
// the measured high-side time per period must be 2 * on-time - dead time
// (+-4 clocks), high and low gates of a phase never overlap, the period must
// be 10000 clocks, and disabled all six gates stay off.
module tb_svpwm;
  localparam int HALF = 5000, DEAD = 100;
  logic clk = 0, rst_n = 0, enable = 1, period_start;
  logic signed [15:0] v_alpha = 0, v_beta = 0;
  logic [2:0] gate_hi, gate_lo;
  logic [15:0] duty [3];
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  svpwm dut (.*);

  real pi = 3.14159265358979;
  int hi_cnt [3], len, overlap = 0;
  real v [3], mx, mn, off, t [3];

  always @(posedge clk) if (rst_n && (gate_hi & gate_lo) != 0) overlap++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 24; n++) begin
      real ang, m;
      ang = 2.0 * pi * n / 24.0 + 0.1;
      m = (n % 3 == 0) ? 0.3 : (n % 3 == 1) ? 0.6 : 0.95;
      v_alpha = 16'(int'(m * 32767.0 * $cos(ang)));
      v_beta  = 16'(int'(m * 32767.0 * $sin(ang)));
      v[0] = real'(v_alpha) / 32768.0;
      v[1] = -v[0] / 2.0 + 0.8660254 * real'(v_beta) / 32768.0;
      v[2] = -v[0] / 2.0 - 0.8660254 * real'(v_beta) / 32768.0;
      mx = v[0]; mn = v[0];
      for (int p = 1; p < 3; p++) begin
        if (v[p] > mx) mx = v[p];
        if (v[p] < mn) mn = v[p];
      end
      off = -(mx + mn) / 2.0;
      for (int p = 0; p < 3; p++) begin
        t[p] = HALF / 2.0 + (v[p] + off) * HALF / 2.0;
        if (t[p] < 0) t[p] = 0;
        if (t[p] > HALF) t[p] = HALF;
      end
      // the vector is taken at a period start; measure the following period
      @(posedge period_start); @(posedge clk);
      @(posedge period_start); @(posedge clk);
      hi_cnt = '{0, 0, 0}; len = 0;
      do begin
        @(posedge clk);
        for (int p = 0; p < 3; p++) hi_cnt[p] += gate_hi[p];
        len++;
      end while (!period_start);
      check(len == 2 * HALF, $sformatf("period %0d", len));
      for (int p = 0; p < 3; p++) begin
        real e;
        e = 2.0 * t[p] - DEAD;
        if (e < 0) e = 0;
        check(hi_cnt[p] > e - 5.0 && hi_cnt[p] < e + 5.0,
              $sformatf("vector %0d phase %0d: high %0d expected %f", n, p, hi_cnt[p], e));
      end
    end
    check(overlap == 0, "no shoot-through");
    enable = 0;
    @(posedge period_start); @(posedge clk);
    repeat (2 * HALF) begin
      @(posedge clk);
      check(gate_hi == 0 && gate_lo == 0, "disabled: all gates off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
