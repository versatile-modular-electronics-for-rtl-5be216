// Self-checking test of pwm_gen at its default 8192-clock period (24.4 kHz
// at 200 MHz): for each signed command the high time per period must equal
// the clamped magnitude and dir the sign; disabled, the output stays low.
module tb_pwm_gen;
  logic clk = 0, rst_n = 0, enable = 1, pwm, dir, period_start;
  logic signed [13:0] cmd = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  pwm_gen dut (.*);
  int high, len, expd;
  int cmds [8] = '{0, 1, 100, -100, 4096, -8191, 8191, -2};
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (cmds[i]) begin
      cmd = 14'(cmds[i]);
      // wait for the next period start, skip one period, then measure one
      @(posedge period_start); @(posedge clk);
      @(posedge period_start); @(posedge clk);
      high = 0; len = 0;
      do begin
        @(posedge clk);
        high += pwm; len++;
      end while (!period_start);
      expd = cmds[i] < 0 ? -cmds[i] : cmds[i];
      if (expd > 8192) expd = 8192;
      check(len == 8192, $sformatf("period %0d", len));
      check(high == expd, $sformatf("cmd %0d: high %0d", cmds[i], high));
      check(dir == (cmds[i] < 0), "dir");
    end
    enable = 0;
    cmd = 14'sd3000;
    repeat (9000) begin @(posedge clk); #0; end
    high = 0;
    repeat (9000) begin @(posedge clk); high += pwm; end
    check(high == 0, "disabled output low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
