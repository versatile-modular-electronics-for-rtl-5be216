// Self-checking test of node_ctrl in a chain of three modules driven by a
// frame master. Each module owns a byte memory with a receive and a transmit
// area. The test sends frames of several payload sizes and checks that every
// module received exactly its own payload, that the master got every module's
// transmit data back, that the flags and checksums are right, that foreign
// sub-frames pass unchanged, and that the frame time grows by ten clocks per
// payload byte (one 8b/10b byte per ten line bits).
module tb_node_ctrl;
  import comm_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // master
  logic        host_we = 0, send = 0;
  logic [9:0]  host_addr = 0;
  logic [7:0]  host_wdata = 0, host_rdata;
  logic [1:0]  n_sub = 2'd3;
  logic [7:0]  sub_id [N], sub_type [N], ret_flag [N];
  logic        ret_ok [N];
  logic        busy, done;
  logic [31:0] frame_cycles;
  logic [15:0] hub_lerr;
  logic        h_tx, h_rx;

  hub_port #(.N_SUB(N)) u_hub (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata, .n_sub,
    .sub_id, .sub_type, .send, .busy, .done, .frame_cycles, .ret_flag, .ret_ok,
    .link_errors(hub_lerr), .tx_line(h_tx), .rx_line(h_rx));

  // nodes and their memories
  logic       dn_tx [N], dn_rx [N], up_tx [N], up_rx [N];
  logic       m_en [N], m_we [N], in_frame [N], rx_upd [N], rx_err [N];
  logic [9:0] m_addr [N];
  logic [7:0] m_wd [N], m_rd [N], rx_type [N];
  logic [15:0] perr [N], lerr [N];
  logic [7:0] mem [N][1024];
  int         upd_count [N];

  for (genvar i = 0; i < N; i++) begin : g_node
    node_ctrl u_node (
      .clk, .rst_n, .my_id(8'(8'h10 + i)), .loopback(i == N-1),
      .up_rx(up_rx[i]), .up_tx(up_tx[i]), .dn_tx(dn_tx[i]), .dn_rx(dn_rx[i]),
      .mem_en(m_en[i]), .mem_we(m_we[i]), .mem_addr(m_addr[i]), .mem_wdata(m_wd[i]),
      .mem_rdata(m_rd[i]), .in_frame(in_frame[i]), .rx_update(rx_upd[i]),
      .rx_type(rx_type[i]), .rx_error(rx_err[i]), .proto_errors(perr[i]),
      .link_errors(lerr[i]));
    always_ff @(posedge clk) begin
      if (m_en[i] && m_we[i]) mem[i][m_addr[i]] <= m_wd[i];
      if (m_en[i])            m_rd[i] <= mem[i][m_addr[i]];
      if (rst_n && rx_upd[i]) upd_count[i] <= upd_count[i] + 1;
    end
    assign up_rx[i] = (i == 0) ? h_tx : dn_tx[(i == 0) ? 0 : i-1];
    assign dn_rx[i] = (i == N-1) ? 1'b0 : up_tx[(i == N-1) ? i : i+1];
  end
  assign h_rx = up_tx[0];

  function automatic logic [7:0] hub_byte(int s, int k, int f);
    return 8'((s * 37 + k * 3 + f * 11) ^ 8'h5A);
  endfunction
  function automatic logic [7:0] node_byte(int s, int k, int f);
    return 8'((s * 53 + k * 7 + f * 5) ^ 8'hC3);
  endfunction

  int cyc [8];
  logic [7:0] types [3] = '{8'h02, 8'h05, 8'h06};   // 50, 150, 250 bytes

  initial begin
    for (int i = 0; i < N; i++) begin
      upd_count[i] = 0;
      for (int a = 0; a < 1024; a++) mem[i][a] = 8'h00;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);   // links align on idle commas
    for (int f = 0; f < 3; f++) begin
      int len;
      len = int'(type_len(types[f]));
      for (int s = 0; s < N; s++) begin
        sub_id[s]   = 8'(8'h10 + s);
        sub_type[s] = types[f];
        for (int k = 0; k < len; k++) begin
          mem[s][256 + k] = node_byte(s, k, f);
          @(negedge clk);
          host_we = 1; host_addr = 10'(s * 256 + k); host_wdata = hub_byte(s, k, f);
        end
      end
      @(negedge clk); host_we = 0;
      @(negedge clk); send = 1;
      @(negedge clk); send = 0;
      wait (done);
      cyc[f] = int'(frame_cycles);
      $display("frame %0d: payload %0d bytes x %0d modules, %0d clocks", f, len, N, cyc[f]);
      @(negedge clk);
      for (int s = 0; s < N; s++) begin
        check(ret_ok[s], $sformatf("f%0d sub %0d returned ok", f, s));
        check(ret_flag[s] == 8'h01, $sformatf("f%0d sub %0d flag %h", f, s, ret_flag[s]));
        check(upd_count[s] == f + 1, $sformatf("f%0d node %0d update count %0d", f, s, upd_count[s]));
        check(rx_type[s] == types[f], "rx_type");
        for (int k = 0; k < len; k++) begin
          check(mem[s][k] == hub_byte(s, k, f),
                $sformatf("f%0d node %0d rx byte %0d", f, s, k));
          host_addr = 10'(s * 256 + k);
          @(negedge clk); @(negedge clk);
          check(host_rdata == node_byte(s, k, f),
                $sformatf("f%0d hub rx sub %0d byte %0d: %h", f, s, k, host_rdata));
        end
      end
      repeat (50) @(negedge clk);
    end
    // The frame time grows by 10 clocks per byte: 3 modules x 100 more bytes.
    // The transmit phase of the master adds up to 9 clocks of jitter.
    check(cyc[1] - cyc[0] > 3000 - 10 && cyc[1] - cyc[0] < 3000 + 10,
          $sformatf("frame time step 50->150: %0d", cyc[1] - cyc[0]));
    check(cyc[2] - cyc[1] > 3000 - 10 && cyc[2] - cyc[1] < 3000 + 10,
          $sformatf("frame time step 150->250: %0d", cyc[2] - cyc[1]));
    // At 5 ns per clock (200 Mb/s, one bit per clock) the frame times match
    // the measured 3-module times of 9.32, 24.30 and 39.30 us within 0.1 us.
    check(cyc[0] * 5 > 9320 - 100 && cyc[0] * 5 < 9320 + 100, "3 x 50 byte frame time");
    check(cyc[1] * 5 > 24300 - 100 && cyc[1] * 5 < 24300 + 100, "3 x 150 byte frame time");
    check(cyc[2] * 5 > 39300 - 100 && cyc[2] * 5 < 39300 + 100, "3 x 250 byte frame time");
    for (int s = 0; s < N; s++) begin
      check(perr[s] == 0, "no protocol errors");
      check(lerr[s] == 0, "no link errors");
    end
    check(hub_lerr == 0, "no hub link errors");
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
