// Self-checking test of tick_gen: ticks are one clock wide and exactly DIV
// clocks apart, for the 320 kHz ADC divider (625 at 200 MHz) and a small one.
module tb_tick_gen;
  logic clk = 0, rst_n = 0, sync = 0, t625, t7;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  tick_gen #(.DIV(625)) dut (.clk, .rst_n, .sync, .tick(t625));
  tick_gen #(.DIV(7))   u7  (.clk, .rst_n, .sync, .tick(t7));
  int c = 0, last625 = -1, last7 = -1, n625 = 0;
  always @(posedge clk) if (rst_n) begin
    c++;
    if (t625) begin
      if (last625 >= 0) check(c - last625 == 625, $sformatf("625 period %0d", c - last625));
      last625 = c; n625++;
    end
    if (t7) begin
      if (last7 >= 0) check(c - last7 == 7, "7 period");
      last7 = c;
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (625 * 20 + 5) @(posedge clk);
    check(n625 == 20, $sformatf("20 ticks in 20 periods, got %0d", n625));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
