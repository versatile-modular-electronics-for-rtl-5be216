// Self-checking test of biquad with its default 5 kHz / 320 kHz Butterworth
// coefficients. A reference filter in real arithmetic runs next to it on
// random input (outputs must agree within 3 LSB); a step must settle to the
// input (unity DC gain); sine amplitudes must follow the Butterworth
// response: about 1 at 500 Hz, 0.707 at the 5 kHz cut-off, below 0.04 at
// 40 kHz.
module tb_biquad;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] x = 0, y;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  biquad dut (.*);

  real b0 = 37775.0 / 16777216.0, b1 = 75551.0 / 16777216.0, b2 = b0;
  real a1 = -31228458.0 / 16777216.0, a2 = 14602343.0 / 16777216.0;
  real rx1, rx2, ry1, ry2;

  task automatic step(input int xin, output real yref);
    @(negedge clk);
    x = 16'(xin); in_valid = 1;
    yref = b0 * xin + b1 * rx1 + b2 * rx2 - a1 * ry1 - a2 * ry2;
    rx2 = rx1; rx1 = xin; ry2 = ry1; ry1 = yref;
    @(negedge clk);
    in_valid = 0;
  endtask

  real yr, amp;
  real pi = 3.14159265358979;

  task automatic sine_amp(input real f, output real a);
    real mx;
    mx = 0;
    for (int n = 0; n < 4000; n++) begin
      step(int'(10000.0 * $sin(2.0 * pi * f * n / 320000.0)), yr);
      if (n > 2000 && (y > mx)) mx = y;
    end
    a = mx / 10000.0;
  endtask

  initial begin
    rx1 = 0; rx2 = 0; ry1 = 0; ry2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      step(int'($urandom % 40001) - 20000, yr);
      check(y - yr < 3.0 && yr - y < 3.0, $sformatf("random: y %0d ref %f", y, yr));
    end
    for (int n = 0; n < 600; n++) step(12345, yr);
    check(y == 12345 || y == 12344 || y == 12346, $sformatf("step settles: %0d", y));
    sine_amp(500.0, amp);   check(amp > 0.97 && amp < 1.03, $sformatf("500 Hz gain %f", amp));
    sine_amp(5000.0, amp);  check(amp > 0.67 && amp < 0.74, $sformatf("5 kHz gain %f", amp));
    sine_amp(40000.0, amp); check(amp < 0.04, $sformatf("40 kHz gain %f", amp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
