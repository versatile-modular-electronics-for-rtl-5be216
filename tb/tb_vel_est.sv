// Self-checking test of vel_est: random position ramps, including wrap-around
// of the 16-bit counter, checked against the difference computed here.
module tb_vel_est;
  logic clk = 0, rst_n = 0, sample = 0, vel_valid;
  logic signed [15:0] pos = 0, vel;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  vel_est dut (.*);
  int p = 30000, prev;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    pos = 16'(p);
    sample = 1; @(negedge clk); sample = 0;
    for (int n = 0; n < 500; n++) begin
      int d;
      d = int'($urandom % 2001) - 1000;
      prev = p; p = p + d;
      repeat (3) @(negedge clk);
      pos = 16'(p);
      sample = 1; @(negedge clk); sample = 0;
      check(vel_valid && vel == 16'(d), $sformatf("vel %0d expected %0d", vel, d));
    end
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
