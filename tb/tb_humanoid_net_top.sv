// End-to-end test of the whole network at its default size: the hub with six
// ports and the 13 limb modules in chains of 2, 3, 3, 1, 2, 2, all timers at
// their real rates (200 MHz clock). Every module gets a 150-byte sub-frame.
// The test checks, and counts how often each mechanism happened:
//  * frames sent by command and by the 1 kHz interval timer, returned on
//    every port, with every sub-frame processed by its module (flag bit 0);
//  * payload exchange in both directions: each module's LEDs take the value
//    sent to it, and the hub gets back each module's sensor values, status
//    and receive count;
//  * the unbuffered upstream return and the loop-back of the last module;
//  * a sub-frame with an invalid type is refused and flagged;
//  * frame time of the 3-module ports against the measured 24.3 us;
//  * motor outputs (PID/PWM and space-vector gates) run while enabled.
module tb_humanoid_net_top;
  import comm_pkg::*;
  localparam int NP = 6, NS = 4;
  localparam int CH [NP] = '{2, 3, 3, 1, 2, 2};
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic host_we = 0, host_send = 0, auto_send = 0, comm_tick;
  logic [2:0] host_port = 0;
  logic [9:0] host_addr = 0;
  logic [7:0] host_wdata = 0, host_rdata;
  logic [2:0] n_sub [NP];
  logic [7:0] sub_type [NP][NS], ret_flag [NP][NS];
  logic busy [NP], done [NP], ret_ok [NP][NS];
  logic [31:0] frame_cycles [NP];
  logic [15:0] hub_link_errors [NP];
  logic [1:0] enc_a [NP][NS], enc_b [NP][NS], pwm [NP][NS], dir [NP][NS];
  logic signed [15:0] abs_pos [NP][NS][2], adc_torque [NP][NS][2], adc_current [NP][NS][2];
  logic signed [15:0] v_alpha [NP][NS][2], v_beta [NP][NS][2];
  logic [2:0] gate_hi [NP][NS][2], gate_lo [NP][NS][2];
  logic [16:0] leds [NP][NS];
  logic adc_tick [NP][NS], temp_tick [NP][NS];
  logic cpu_req [NP][NS], cpu_gnt [NP][NS], cpu_rvalid [NP][NS];
  logic [1:0] cpu_we [NP][NS];
  logic [8:0] cpu_addr [NP][NS];
  logic [15:0] cpu_wdata [NP][NS], cpu_rdata [NP][NS];
  logic in_frame [NP][NS], rx_update [NP][NS], wd_expired [NP][NS];
  logic [15:0] link_errors [NP][NS];

  humanoid_net_top dut (.*);

  // mechanism counters
  int n_done = 0, n_auto = 0, n_processed = 0, n_type_err = 0, n_updates = 0;
  int n_pwm = 0, n_gate = 0, n_led_ok = 0, n_sensor_ok = 0, n_frame_time_ok = 0;
  int n_inframe = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (done[p]) n_done++;
      for (int j = 0; j < NS; j++) begin
        if (rx_update[p][j]) n_updates++;
        if (pwm[p][j] != 0) n_pwm++;
        if (gate_hi[p][j][0] != 0) n_gate++;
        if (in_frame[p][j]) n_inframe++;
      end
    end
    if (comm_tick && auto_send) n_auto++;
  end

  function automatic int mid(int p, int j);
    return 16 * p + j + 1;
  endfunction

  // payload words sent to module (p, j): set-points, LEDs, enables, gains
  function automatic logic [15:0] pword(int p, int j, int w);
    case (w)
      0: return 16'(100 + mid(p, j));
      1: return 16'(-50);
      2: return 16'(16'h1000 * j + 16'h0101 * p + 16'h0011);
      3: return 16'b1111;
      4, 7: return 16'd64;
      default: return 16'd0;
    endcase
  endfunction

  task automatic load_payloads();
    for (int p = 0; p < NP; p++)
      for (int j = 0; j < CH[p]; j++)
        for (int k = 0; k < 150; k++) begin
          logic [15:0] w;
          w = pword(p, j, k / 2);
          @(negedge clk);
          host_we = 1; host_port = 3'(p); host_addr = 10'(j * 256 + k);
          host_wdata = k[0] ? w[15:8] : w[7:0];
        end
    @(negedge clk); host_we = 0;
  endtask

  task automatic wait_frames();
    int t;
    t = 0;
    @(negedge clk);
    while ((busy[0] || busy[1] || busy[2] || busy[3] || busy[4] || busy[5]) && t < 100000) begin
      @(negedge clk); t++;
    end
    repeat (2) @(negedge clk);
  endtask

  logic [15:0] rw;
  task automatic read_word(int p, int j, int w);
    host_port = 3'(p);
    host_addr = 10'(j * 256 + 2 * w);
    @(negedge clk); @(negedge clk);
    rw[7:0] = host_rdata;
    host_addr = 10'(j * 256 + 2 * w + 1);
    @(negedge clk); @(negedge clk);
    rw[15:8] = host_rdata;
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin
      n_sub[p] = 3'(CH[p]);
      for (int j = 0; j < NS; j++) begin
        sub_type[p][j] = 8'h05;         // 150-byte payload
        enc_a[p][j] = 0; enc_b[p][j] = 0;
        cpu_req[p][j] = 0; cpu_we[p][j] = 0; cpu_addr[p][j] = 0; cpu_wdata[p][j] = 0;
        for (int a = 0; a < 2; a++) begin
          abs_pos[p][j][a] = 16'(mid(p, j) * 10 + a);
          adc_torque[p][j][a] = 16'(-mid(p, j));
          adc_current[p][j][a] = 16'(2 * mid(p, j));
          v_alpha[p][j][a] = 16'sd12000; v_beta[p][j][a] = 16'sd5000;
        end
      end
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    load_payloads();
    repeat (200) @(negedge clk);
    // 1: frame by command
    host_send = 1; @(negedge clk); host_send = 0;
    wait_frames();
    for (int p = 0; p < NP; p++) begin
      if (CH[p] == 3) begin
        // 3 modules x 150 bytes: measured 24.30 us = 4860 clocks of 5 ns
        check(frame_cycles[p] * 5 > 24300 - 150 && frame_cycles[p] * 5 < 24300 + 150,
              $sformatf("port %0d frame time %0d clocks", p, frame_cycles[p]));
        if (frame_cycles[p] * 5 > 24300 - 150 && frame_cycles[p] * 5 < 24300 + 150) n_frame_time_ok++;
      end
      for (int j = 0; j < CH[p]; j++) begin
        check(ret_ok[p][j], $sformatf("port %0d module %0d returned ok", p, j));
        check(ret_flag[p][j] == 8'h01, $sformatf("port %0d module %0d flag %h", p, j, ret_flag[p][j]));
        if (ret_flag[p][j][FLAG_PROCESSED]) n_processed++;
      end
    end
    // 2: wait for a control tick (5 kHz = 40000 clocks): LEDs, sensors to memory
    repeat (45000) @(negedge clk);
    for (int p = 0; p < NP; p++)
      for (int j = 0; j < CH[p]; j++) begin
        check(leds[p][j] == {1'b1, pword(p, j, 2)}, $sformatf("leds %0d/%0d = %h", p, j, leds[p][j]));
        if (leds[p][j] == {1'b1, pword(p, j, 2)}) n_led_ok++;
      end
    // 3: frames from the 1 kHz interval timer
    auto_send = 1;
    @(posedge comm_tick);
    repeat (2) @(negedge clk);
    auto_send = 0;
    wait_frames();
    for (int p = 0; p < NP; p++)
      for (int j = 0; j < CH[p]; j++) begin
        bit ok;
        check(ret_ok[p][j] && ret_flag[p][j] == 8'h01, "auto frame processed");
        if (ret_flag[p][j][FLAG_PROCESSED]) n_processed++;
        read_word(p, j, 2);   // filtered absolute-encoder position axis 0
        ok = (rw == 16'(mid(p, j) * 10));
        read_word(p, j, 11);  // filtered motor current axis 1
        ok = ok && (rw == 16'(2 * mid(p, j)));
        read_word(p, j, 12);  // status: both axes enabled
        ok = ok && (rw == 16'b110);
        read_word(p, j, 13);  // one sub-frame received before the last sample
        ok = ok && (rw == 16'd1);
        check(ok, $sformatf("sensor values of module %0d/%0d", p, j));
        if (ok) n_sensor_ok++;
      end
    // 4: invalid type on port 1, module 0
    sub_type[1][0] = 8'h85;
    host_send = 1; @(negedge clk); host_send = 0;
    wait_frames();
    check(ret_flag[1][0][FLAG_TYPE_ERR] && ret_flag[1][0][FLAG_PROCESSED], "type error flagged");
    if (ret_flag[1][0][FLAG_TYPE_ERR]) n_type_err++;
    check(ret_flag[1][1] == 8'h01, "next module unaffected");
    // link health
    for (int p = 0; p < NP; p++) begin
      check(hub_link_errors[p] == 0, "hub link errors");
      for (int j = 0; j < CH[p]; j++) check(link_errors[p][j] == 0, "module link errors");
    end
    // every mechanism happened
    $display("frames returned %0d, by timer %0d, sub-frames processed %0d, module updates %0d",
             n_done, n_auto, n_processed, n_updates);
    $display("type errors %0d, LED updates %0d, sensor read-backs %0d, frame-time checks %0d",
             n_type_err, n_led_ok, n_sensor_ok, n_frame_time_ok);
    $display("pwm-high clocks %0d, gate-high clocks %0d, in-frame clocks %0d", n_pwm, n_gate, n_inframe);
    check(n_done == 3 * NP, "all frames returned");
    check(n_auto >= 1, "interval timer frame");
    check(n_processed == 26, "sub-frames processed");
    check(n_updates == 13 * 3 - 1, "module updates");
    check(n_type_err == 1, "type error mechanism");
    check(n_led_ok == 13, "LED mechanism");
    check(n_sensor_ok == 13, "sensor read-back mechanism");
    check(n_frame_time_ok == 2, "frame time mechanism");
    check(n_pwm > 0, "PWM mechanism");
    check(n_gate > 0, "space-vector mechanism");
    check(n_inframe > 0, "in-frame debug pin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
