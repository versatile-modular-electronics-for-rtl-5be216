// Self-checking test of mem_bus with three masters on a memory model: random
// reads and writes, data checked against a reference, every master must be
// granted within three clocks (round robin), at most one grant per clock,
// and every master completes all of its 300 accesses.
module tb_mem_bus;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic req [N], gnt [N], rvalid [N];
  logic [1:0] we [N];
  logic [8:0] addr [N];
  logic [15:0] wdata [N], rdata;
  logic m_en; logic [1:0] m_we; logic [8:0] m_addr; logic [15:0] m_wdata, m_rdata;
  logic [15:0] mem [512], ref_mem [512];

  mem_bus #(.N(N)) dut (.*);

  always_ff @(posedge clk) if (m_en) begin
    if (m_we[0]) mem[m_addr][7:0] <= m_wdata[7:0];
    if (m_we[1]) mem[m_addr][15:8] <= m_wdata[15:8];
    m_rdata <= mem[m_addr];
  end

  int waited [N];
  logic [15:0] expect_rd [N];
  int grants;
  int done_n [N] = '{default: 0};

  // each master runs its own stream of accesses on its own address range
  for (genvar g = 0; g < N; g++) begin : g_m
    initial begin
      req[g] = 0; we[g] = 0; addr[g] = 0; wdata[g] = 0; waited[g] = 0;
      wait (rst_n);
      for (int n = 0; n < 300; n++) begin
        logic [8:0] a;
        a = 9'(g * 128 + ($urandom % 128));
        @(negedge clk);
        req[g] = 1; addr[g] = a;
        if ($urandom % 2) begin we[g] = 2'b11; wdata[g] = 16'($urandom); end
        else we[g] = 2'b00;
        waited[g] = 0;
        @(posedge clk);
        while (!gnt[g]) begin waited[g]++; @(posedge clk); end
        check(waited[g] < N, $sformatf("master %0d waited %0d", g, waited[g]));
        if (we[g] != 0) ref_mem[a] = wdata[g];
        else expect_rd[g] = ref_mem[a];
        @(negedge clk);
        req[g] = 0;
        if (we[g] == 0) check(rvalid[g] && rdata == expect_rd[g], $sformatf("master %0d read %0d", g, a));
        done_n[g]++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    grants = 0;
    for (int i = 0; i < N; i++) grants += gnt[i];
    check(grants <= 1, "one grant per clock");
  end

  initial begin
    for (int i = 0; i < 512; i++) begin mem[i] = 0; ref_mem[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // all masters finish their 300 accesses (at most 3 clocks each)
    wait (done_n[0] == 300 && done_n[1] == 300 && done_n[2] == 300);
    for (int g = 0; g < N; g++) check(done_n[g] == 300, $sformatf("master %0d finished", g));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    for (int g = 0; g < N; g++) $display("FAIL: watchdog, master %0d completed %0d accesses", g, done_n[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
