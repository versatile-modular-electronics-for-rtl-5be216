// Self-checking test of quad_decoder: drives a random walk of quadrature
// steps (A leads B = up), tracks the expected count independently, and checks
// the position after each step and that a double step is counted as an error.
module tb_quad_decoder;
  logic clk = 0, rst_n = 0, enc_a = 0, enc_b = 0;
  logic signed [15:0] pos;
  logic [15:0] errors;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  quad_decoder dut (.*);
  // phase 0..3 maps to AB = 00, 10, 11, 01
  int phase = 0, expected = 0;
  task automatic set_phase(int p);
    enc_a = (p == 1 || p == 2);
    enc_b = (p == 2 || p == 3);
  endtask
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      int step;
      step = ($urandom % 3 == 0) ? -1 : 1;
      if (n > 1500) step = -step;
      phase = (phase + step + 4) % 4;
      expected += step;
      set_phase(phase);
      repeat (4) @(negedge clk);
      check(pos == 16'(expected), $sformatf("pos %0d expected %0d", pos, expected));
    end
    check(errors == 0, "no errors on legal steps");
    phase = (phase + 2) % 4;
    set_phase(phase);
    repeat (4) @(negedge clk);
    check(errors == 1, "double step counted");
    check(pos == 16'(expected), "double step does not move");
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
