// Self-checking test of central_hub with every port looped back (transmit
// line wired to receive line), so frames return unprocessed. Checks for each
// port that the frame returns, that every sub-frame comes back with a good
// checksum and ID and a clear flag, that the returned payload equals the
// payload sent, that the frame time equals the byte count times ten clocks
// plus the fixed link latency, and that auto_send starts frames on the
// interval timer.
module tb_central_hub;
  import comm_pkg::*;
  localparam int NP = 3, NS = 2;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic host_we = 0, host_send = 0, auto_send = 0, comm_tick;
  logic [1:0] host_port = 0;
  logic [8:0] host_addr = 0;
  logic [7:0] host_wdata = 0, host_rdata;
  logic [1:0] n_sub [NP];
  logic [7:0] sub_id [NP][NS], sub_type [NP][NS], ret_flag [NP][NS];
  logic busy [NP], done [NP], ret_ok [NP][NS], tx_line [NP], rx_line [NP];
  logic [31:0] frame_cycles [NP];
  logic [15:0] link_errors [NP];

  central_hub #(.N_PORTS(NP), .N_SUB(NS), .COMM_DIV(20000)) dut (.*);
  assign rx_line = tx_line;

  int ndone [NP];
  always @(posedge clk) for (int p = 0; p < NP; p++) if (rst_n && done[p]) ndone[p]++;

  function automatic logic [7:0] pb(int p, int s, int k);
    return 8'(p * 91 + s * 17 + k * 5 + 3);
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) begin
      ndone[p] = 0;
      n_sub[p] = 2'(p == 2 ? 1 : 2);
      for (int s = 0; s < NS; s++) begin
        sub_id[p][s] = 8'(p * 16 + s + 1);
        sub_type[p][s] = (p == 1) ? 8'h01 : 8'h02;   // 16 or 50 bytes
      end
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++)
      for (int s = 0; s < NS; s++)
        for (int k = 0; k < 50; k++) begin
          @(negedge clk);
          host_we = 1; host_port = 2'(p); host_addr = 9'(s * 256 + k); host_wdata = pb(p, s, k);
        end
    @(negedge clk); host_we = 0;
    repeat (300) @(negedge clk);
    host_send = 1; @(negedge clk); host_send = 0;
    wait (!busy[0] && !busy[1] && !busy[2]);
    repeat (2) @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      int len, bytes;
      len = (p == 1) ? 16 : 50;
      bytes = int'(n_sub[p]) * (len + SUB_OVERHEAD) + 2;   // sub-frames + SOF + EOF
      check(ndone[p] == 1, $sformatf("port %0d frame returned (%0d)", p, ndone[p]));
      // 10 clocks per byte; link latency plus start phase is under 40 clocks
      check(int'(frame_cycles[p]) >= bytes * 10 && int'(frame_cycles[p]) < bytes * 10 + 40,
            $sformatf("port %0d frame time %0d for %0d bytes", p, frame_cycles[p], bytes));
      for (int s = 0; s < int'(n_sub[p]); s++) begin
        check(ret_ok[p][s], $sformatf("port %0d sub %0d ok", p, s));
        check(ret_flag[p][s] == 8'h00, "flag clear (no module on the loop)");
        for (int k = 0; k < len; k++) begin
          host_port = 2'(p); host_addr = 9'(s * 256 + k);
          @(negedge clk); @(negedge clk);
          check(host_rdata == pb(p, s, k), $sformatf("port %0d sub %0d byte %0d", p, s, k));
        end
      end
      check(link_errors[p] == 0, "no link errors");
    end
    auto_send = 1;
    repeat (3 * 20000 + 100) @(negedge clk);
    for (int p = 0; p < NP; p++)
      check(ndone[p] == 4, $sformatf("port %0d: 3 frames from the interval timer, %0d in all", p, ndone[p]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
