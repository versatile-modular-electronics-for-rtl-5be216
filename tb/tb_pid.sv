// Self-checking test of pid: random set-points, feedback and gains, the
// output compared with a reference computed here in 64-bit integers,
// including the integral clamp and output saturation; disable clears state.
module tb_pid;
  logic clk = 0, rst_n = 0, tick = 0, enable = 1, u_valid;
  logic signed [15:0] setpoint = 0, feedback = 0;
  logic [15:0] kp = 0, ki = 0, kd = 0;
  logic signed [13:0] u;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  pid dut (.*);
  longint integ = 0, eprev = 0, e, s, uexp;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      if (n % 500 == 0) begin
        kp = 16'($urandom % 600); ki = 16'($urandom % 8); kd = 16'($urandom % 300);
      end
      setpoint = 16'($urandom % 4001) - 16'sd2000;
      feedback = (n % 1000 < 500) ? setpoint + 16'(int'($urandom % 201) - 100) : 16'($urandom);
      @(negedge clk);
      tick = 1;
      @(negedge clk);
      tick = 0;
      e = longint'(setpoint) - longint'(feedback);
      integ = integ + e;
      if (integ > (1 << 20)) integ = 1 << 20;
      if (integ < -(1 << 20)) integ = -(1 << 20);
      s = longint'(kp) * e + longint'(ki) * integ + longint'(kd) * (e - eprev);
      eprev = e;
      uexp = s >>> 8;
      if (uexp > 8191) uexp = 8191;
      if (uexp < -8192) uexp = -8192;
      check(u_valid && longint'(u) == uexp, $sformatf("n=%0d u %0d expected %0d", n, u, uexp));
    end
    enable = 0; @(negedge clk); enable = 1;
    integ = 0; eprev = 0;
    kp = 100; ki = 1; kd = 0; setpoint = 100; feedback = 0;
    tick = 1; @(negedge clk); tick = 0;
    check(u == 14'((100 * 100 + 100) >>> 8), "after disable the integral restarts");
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
