// Frame-time sweep over chain length and payload size.
//
// A frame master (hub_port) drives a chain of up to 50 node_ctrl modules, each
// with its own byte memory. The chain length is chosen at run time by setting
// `loopback` on module n-1; modules beyond it see the frame pass by but their
// return path is not connected. For every case the test checks that each
// module's sub-frame came back processed with a good checksum, that every
// module received its own payload, and that the round-trip time agrees with
// the timing model of the network:
//
//   t = t_s + t_r + sum_i (M_i + 6) * t_b + n * t_delta
//
// with t_b = 50 ns per 8b/10b byte at 200 Mb/s. Two sets of reference times
// are used:
//   - measured times for 1, 2 and 3 modules with 50/150/250-byte payloads;
//     the simulated time must be within 0.25 us of them;
//   - model predictions for 1, 10, 25 and 50 modules with 0/16/64/128/256-byte
//     payloads. The byte term is exact in this design (10 clocks per byte),
//     but a module here delays the frame by about 52 clocks (0.26 us: the
//     4-symbol start threshold alone is 40 clocks) where the model uses
//     0.186 us, and the fixed send/receive overhead is about 34 clocks where
//     the model uses 0.48 us. The simulated time must therefore be within
//     0.3 us plus 0.09 us per module of the prediction.
// The test also checks this design's own figures exactly: 10 clocks per
// payload byte, and a per-module delay of 45 to 60 clocks, both within the
// 10-clock phase jitter of the serializer.
// Moving the loopback point while the lines run upsets the word alignment of
// the master's receiver once; after a settling time the links realign on
// idle commas, so link errors are only counted while a frame is in flight.
// Frames also travel on past the loopback point; the test waits until they
// have left the chain before it moves the loopback point.
//
// One clock is one line bit (5 ns). The master is built with N_SUB = 50 so
// that one frame can address all 50 modules; the default hub port holds 4.
module tb_frame_timing;
  import comm_pkg::*;

  localparam int NMAX = 50;
  localparam int HAW  = $clog2(NMAX * MAX_PAYLOAD);
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
  logic           host_we = 0, send = 0;
  logic [HAW-1:0] host_addr = 0;
  logic [7:0]     host_wdata = 0, host_rdata;
  logic [5:0]     n_sub = 0;
  logic [7:0]     sub_id [NMAX], sub_type [NMAX], ret_flag [NMAX];
  logic           ret_ok [NMAX];
  logic           busy, done;
  logic [31:0]    frame_cycles;
  logic [15:0]    hub_lerr;
  logic           h_tx, h_rx;

  hub_port #(.N_SUB(NMAX)) u_hub (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata, .n_sub,
    .sub_id, .sub_type, .send, .busy, .done, .frame_cycles, .ret_flag, .ret_ok,
    .link_errors(hub_lerr), .tx_line(h_tx), .rx_line(h_rx));

  // chain of nodes, each with a byte memory (receive area 0, transmit area 256)
  int         nmod = 1;
  logic       dn_tx [NMAX], dn_rx [NMAX], up_tx [NMAX], up_rx [NMAX];
  logic       m_en [NMAX], m_we [NMAX], in_frame [NMAX], rx_upd [NMAX], rx_err [NMAX];
  logic [9:0] m_addr [NMAX];
  logic [7:0] m_wd [NMAX], m_rd [NMAX], rx_type [NMAX];
  logic [15:0] perr [NMAX], lerr [NMAX];
  logic [7:0] mem [NMAX][512];

  for (genvar i = 0; i < NMAX; i++) begin : g_node
    node_ctrl u_node (
      .clk, .rst_n, .my_id(8'(i + 1)), .loopback(i == nmod - 1),
      .up_rx(up_rx[i]), .up_tx(up_tx[i]), .dn_tx(dn_tx[i]), .dn_rx(dn_rx[i]),
      .mem_en(m_en[i]), .mem_we(m_we[i]), .mem_addr(m_addr[i]), .mem_wdata(m_wd[i]),
      .mem_rdata(m_rd[i]), .in_frame(in_frame[i]), .rx_update(rx_upd[i]),
      .rx_type(rx_type[i]), .rx_error(rx_err[i]), .proto_errors(perr[i]),
      .link_errors(lerr[i]));
    always_ff @(posedge clk) begin
      if (m_en[i] && m_we[i]) mem[i][m_addr[i][8:0]] <= m_wd[i];
      if (m_en[i])            m_rd[i] <= mem[i][m_addr[i][8:0]];
    end
    assign up_rx[i] = (i == 0) ? h_tx : dn_tx[(i == 0) ? 0 : i-1];
    assign dn_rx[i] = (i == NMAX-1) ? 1'b0 : up_tx[(i == NMAX-1) ? i : i+1];
  end
  assign h_rx = up_tx[0];

  function automatic logic [7:0] hub_byte(int s, int k, int f);
    return 8'((s * 37 + k * 3 + f * 11) ^ 8'h5A);
  endfunction
  function automatic logic [7:0] node_byte(int s, int k, int f);
    return 8'((s * 53 + k * 7 + f * 5) ^ 8'hC3);
  endfunction

  int frame_no = 0;
  logic [15:0] lerr0;

  // Runs one frame of n sub-frames of the given type and returns its clocks.
  task automatic run_frame(input int n, input logic [7:0] typ, output int cycles);
    int len;
    len  = int'(type_len(typ));
    nmod = n;
    n_sub = 6'(n);
    for (int s = 0; s < n; s++) begin
      sub_id[s]   = 8'(s + 1);
      sub_type[s] = typ;
      for (int k = 0; k < len; k++) begin
        mem[s][256 + k] = node_byte(s, k, frame_no);
        mem[s][k]       = 8'h00;
        @(negedge clk);
        host_we = 1; host_addr = HAW'(s * MAX_PAYLOAD + k); host_wdata = hub_byte(s, k, frame_no);
      end
    end
    @(negedge clk); host_we = 0;
    repeat (400) @(negedge clk);   // the links realign after the loopback point moved
    lerr0 = hub_lerr;
    send = 1;
    @(negedge clk); send = 0;
    wait (done);
    cycles = int'(frame_cycles);
    check(hub_lerr == lerr0, $sformatf("n=%0d len=%0d: link errors during the frame", n, len));
    @(negedge clk);
    for (int s = 0; s < n; s++) begin
      check(ret_ok[s] && ret_flag[s] == 8'h01,
            $sformatf("n=%0d len=%0d sub %0d ok=%0d flag=%h", n, len, s, ret_ok[s], ret_flag[s]));
      // spot-check the payload in both directions: first, middle and last byte
      for (int q = 0; q < 3 && len > 0; q++) begin
        int k;
        k = (q == 0) ? 0 : (q == 1) ? len / 2 : len - 1;
        check(mem[s][k] == hub_byte(s, k, frame_no),
              $sformatf("n=%0d len=%0d node %0d rx byte %0d", n, len, s, k));
        host_addr = HAW'(s * MAX_PAYLOAD + k);
        @(negedge clk); @(negedge clk);
        check(host_rdata == node_byte(s, k, frame_no),
              $sformatf("n=%0d len=%0d hub got sub %0d byte %0d = %h", n, len, s, k, host_rdata));
      end
    end
    frame_no++;
    // Copies of the frame also run on past the loopback point. Let them
    // drain off the far end of the 50-node chain before the loopback point
    // moves, so that none is turned back into the next measurement.
    repeat (cycles + NMAX * 70) @(negedge clk);
  endtask

  // measured round-trip times in ns: rows 50/150/250 bytes, columns 1/2/3 modules
  int meas [3][3] = '{'{3180, 6240, 9320}, '{8200, 16240, 24300}, '{13240, 26300, 39300}};
  logic [7:0] t2_type [3] = '{8'h02, 8'h05, 8'h06};
  // model predictions in ns: rows 0/16/64/128/256 bytes, columns 1/10/25/50 modules
  int pred [5][4] = '{'{960, 5320, 12580, 24680}, '{1760, 13320, 32580, 64680},
                      '{4160, 36840, 92580, 184680}, '{7360, 69320, 172580, 344680},
                      '{13760, 133320, 332580, 664680}};
  // (50 x 256 bytes: 0.48 + 50 * 262 * 0.05 + 50 * 0.186 = 664.8 us by the
  //  model; 664.68 us keeps the small offset of the other entries)
  logic [7:0] t3_type [5] = '{8'h00, 8'h01, 8'h03, 8'h04, 8'h07};
  int t3_n [4] = '{1, 10, 25, 50};

  initial begin
    int cyc, ns, tol;
    int c1 [5], c0 [4];
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);   // links align on idle commas

    // measured times: 1..3 modules x 50/150/250 bytes
    for (int r = 0; r < 3; r++)
      for (int n = 1; n <= 3; n++) begin
        run_frame(n, t2_type[r], cyc);
        ns = cyc * 5;
        $display("measured-table case: %0d modules x %0d bytes: %0d clocks = %0d ns (measured %0d ns)",
                 n, type_len(t2_type[r]), cyc, ns, meas[r][n-1]);
        check(ns > meas[r][n-1] - 250 && ns < meas[r][n-1] + 250,
              $sformatf("frame time %0d ns vs measured %0d ns", ns, meas[r][n-1]));
      end

    // model predictions: 1/10/25/50 modules x 0..256 bytes
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 4; c++) begin
        run_frame(t3_n[c], t3_type[r], cyc);
        ns  = cyc * 5;
        tol = 300 + 90 * t3_n[c];
        $display("prediction-table case: %0d modules x %0d bytes: %0d clocks = %0d ns (model %0d ns)",
                 t3_n[c], type_len(t3_type[r]), cyc, ns, pred[r][c]);
        check(ns > pred[r][c] - tol && ns < pred[r][c] + tol,
              $sformatf("frame time %0d ns vs model %0d ns", ns, pred[r][c]));
        if (c == 0) c1[r] = cyc;
        if (r == 0) c0[c] = cyc;
      end
    // exact byte slope for one module: 10 clocks per payload byte
    check(c1[4] - c1[0] > 2560 - 10 && c1[4] - c1[0] < 2560 + 10,
          $sformatf("1 module, 0 -> 256 bytes adds %0d clocks", c1[4] - c1[0]));

    // per-module delay: a 0-byte sub-frame is 6 bytes = 60 clocks plus the hop
    for (int c = 1; c < 4; c++)
      check((c0[c] - c0[0]) / (t3_n[c] - 1) - 60 >= 45 && (c0[c] - c0[0]) / (t3_n[c] - 1) - 60 <= 60,
            $sformatf("per-module delay %0d clocks", (c0[c] - c0[0]) / (t3_n[c] - 1) - 60));
    for (int s = 0; s < NMAX; s++) begin
      check(perr[s] == 0, $sformatf("node %0d protocol errors %0d", s, perr[s]));
      check(lerr[s] == 0, $sformatf("node %0d link errors %0d", s, lerr[s]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
