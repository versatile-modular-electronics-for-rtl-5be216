// Self-checking test of shared_mem: writes through both ports with byte
// enables, reads back on the other port, and compares with a reference array.
module tb_shared_mem;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic a_en = 0, b_en = 0;
  logic [1:0] a_we = 0, b_we = 0;
  logic [8:0] a_addr = 0, b_addr = 0;
  logic [15:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [15:0] ref_mem [512];

  shared_mem dut (.*);

  initial begin
    for (int i = 0; i < 512; i++) ref_mem[i] = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [8:0] a; logic [1:0] be; logic [15:0] d; bit pa;
      a = 9'($urandom); be = 2'($urandom); d = 16'($urandom); pa = $urandom % 2;
      @(negedge clk);
      if (pa) begin a_en = 1; a_we = be; a_addr = a; a_wdata = d; end
      else    begin b_en = 1; b_we = be; b_addr = a; b_wdata = d; end
      if (be[0]) ref_mem[a][7:0]  = d[7:0];
      if (be[1]) ref_mem[a][15:8] = d[15:8];
      @(negedge clk);
      a_en = 0; b_en = 0; a_we = 0; b_we = 0;
      // read back on the other port
      if (pa) begin b_en = 1; b_addr = a; end else begin a_en = 1; a_addr = a; end
      @(negedge clk);
      check((pa ? b_rdata : a_rdata) == ref_mem[a], $sformatf("read back %0d", a));
      a_en = 0; b_en = 0;
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
