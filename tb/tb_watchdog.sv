// Self-checking test of watchdog: kicked regularly it never expires; without
// kicks it expires after exactly TIMEOUT clocks and clears on the next kick.
module tb_watchdog;
  localparam int T = 100;
  logic clk = 0, rst_n = 0, enable = 1, kick = 0, expired;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  watchdog #(.TIMEOUT(T)) dut (.*);
  int n;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      repeat (T - 10) begin @(negedge clk); check(!expired, "kicked: no expiry"); end
      kick = 1; @(negedge clk); kick = 0;
    end
    n = 0;
    while (!expired && n < 3 * T) begin @(negedge clk); n++; end
    check(n == T, $sformatf("expired after %0d clocks, expected %0d", n, T));
    repeat (50) begin @(negedge clk); check(expired, "stays expired"); end
    kick = 1; @(negedge clk); kick = 0;
    check(!expired, "kick clears");
    enable = 0;
    repeat (3 * T) @(negedge clk);
    check(!expired, "disabled: no expiry");
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
