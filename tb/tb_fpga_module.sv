// Self-checking test of one limb module (fpga_module) behind a frame master.
// The master writes set-points, gains, enables and the LED pattern into the
// module's sub-frame; the test drives the encoders and sensor samples and
// checks: LEDs follow the frame; the filtered sensor values, status word and
// receive count come back in the returned payload; the PID/PWM channel drives
// towards the set-point (direction and non-zero duty); the space-vector
// stage switches its gates; the soft CPU port reads and writes shared
// memory; and the watchdog turns the motor outputs off when frames stop.
// Timers are shortened by parameters so the test runs quickly.
module tb_fpga_module;
  import comm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // master
  logic        host_we = 0, send = 0, busy, done;
  logic [7:0]  host_addr = 0, host_wdata = 0, host_rdata;
  logic [7:0]  sub_id [1] = '{8'h21}, sub_type [1] = '{8'h02}, ret_flag [1];
  logic        ret_ok [1];
  logic [31:0] frame_cycles;
  logic [15:0] hub_lerr;
  logic        h_tx, h_rx;

  hub_port #(.N_SUB(1)) u_hub (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata, .n_sub(1'b1),
    .sub_id, .sub_type, .send, .busy, .done, .frame_cycles, .ret_flag, .ret_ok,
    .link_errors(hub_lerr), .tx_line(h_tx), .rx_line(h_rx));

  // module
  logic [1:0] enc_a = 0, enc_b = 0, pwm, dir;
  logic signed [15:0] abs_pos [2], adc_torque [2], adc_current [2], v_alpha [2], v_beta [2];
  logic [2:0] gate_hi [2], gate_lo [2];
  logic [16:0] leds;
  logic adc_tick, temp_tick, dn_tx, in_frame, rx_update, wd_expired;
  logic cpu_req = 0, cpu_gnt, cpu_rvalid;
  logic [1:0] cpu_we = 0;
  logic [8:0] cpu_addr = 0;
  logic [15:0] cpu_wdata = 0, cpu_rdata, link_errors;

  fpga_module #(.WD_TIMEOUT(60000), .CTRL_DIV(2000), .ADC_DIV(50), .TEMP_DIV(100000),
                .SVM_HALF(500), .PWM_PERIOD(512)) dut (
    .clk, .rst_n, .my_id(8'h21), .loopback(1'b1),
    .up_rx(h_tx), .up_tx(h_rx), .dn_tx, .dn_rx(1'b0),
    .enc_a, .enc_b, .abs_pos, .adc_torque, .adc_current, .adc_tick, .temp_tick,
    .pwm, .dir, .v_alpha, .v_beta, .gate_hi, .gate_lo, .leds,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_gnt, .cpu_rvalid, .cpu_rdata,
    .in_frame, .rx_update, .wd_expired, .link_errors);

  logic [15:0] wr [25];
  logic [15:0] rd [25];
  int qpos = 0, qphase = 0;

  task automatic qstep(input int dirn);
    qphase = (qphase + dirn + 4) % 4;
    qpos += dirn;
    enc_a = {1'b0, qphase == 1 || qphase == 2};
    enc_b = {1'b0, qphase == 2 || qphase == 3};
  endtask

  task automatic frame();
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      host_we = 1; host_addr = 8'(k); host_wdata = k[0] ? wr[k/2][15:8] : wr[k/2][7:0];
    end
    @(negedge clk); host_we = 0; send = 1;
    @(negedge clk); send = 0;
    wait (done);
    @(negedge clk);
    for (int k = 0; k < 50; k++) begin
      host_addr = 8'(k);
      @(negedge clk); @(negedge clk);
      if (k[0]) rd[k/2][15:8] = host_rdata; else rd[k/2][7:0] = host_rdata;
    end
  endtask

  int hi_pwm, gate_edges;
  logic [2:0] last_hi;
  always @(posedge clk) begin
    if (pwm[0]) hi_pwm++;
    if (gate_hi[1] != last_hi) gate_edges++;
    last_hi = gate_hi[1];
  end

  initial begin
    for (int a = 0; a < 2; a++) begin
      abs_pos[a] = 16'(1000 + 500 * a); adc_torque[a] = 16'(-300 + a);
      adc_current[a] = 16'(700 - a); v_alpha[a] = 0; v_beta[a] = 0;
    end
    v_alpha[1] = 16'sd16000;
    for (int i = 0; i < 25; i++) wr[i] = 0;
    wr[0] = 16'd200;          // set-point axis 0
    wr[1] = 16'hFFF0;         // set-point axis 1 (-16)
    wr[2] = 16'hA5C3;         // LEDs 15:0
    wr[3] = 16'b1111;         // LED16, axis 0/1 enable, SVM enable
    wr[4] = 16'd256; wr[5] = 16'd0; wr[6] = 16'd0;   // kp ki kd axis 0
    wr[7] = 16'd256; wr[8] = 16'd0; wr[9] = 16'd0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (400) @(negedge clk);
    for (int i = 0; i < 40; i++) begin qstep(1); repeat (20) @(negedge clk); end
    frame();
    check(ret_ok[0] && ret_flag[0] == 8'h01, "sub-frame processed");
    repeat (12000) @(negedge clk);   // several control ticks, filters settle
    check(leds == 17'h1A5C3, $sformatf("leds %h", leds));
    frame();
    check(rd[0] > 16'sd38 && rd[0] < 16'sd42, $sformatf("filtered motor position %0d", $signed(rd[0])));
    check(rd[2] == 16'd1000, $sformatf("filtered absolute position %0d", rd[2]));
    check(rd[4] == 16'hFED4, $sformatf("filtered torque %0d", $signed(rd[4])));
    check(rd[5] == 16'd700, $sformatf("filtered current %0d", rd[5]));
    check(rd[8] == 16'd1500, $sformatf("axis 1 absolute position %0d", rd[8]));
    check(rd[12] == 16'b110, $sformatf("status %b", rd[12]));
    check(rd[13] == 16'd1, $sformatf("receive count at last sample %0d", rd[13]));
    // PID: error 200 - 40 = 160 counts, kp = 1.0 -> 160 of 512 clocks high
    hi_pwm = 0;
    repeat (2048) @(negedge clk);
    check(hi_pwm >= 4 * 158 && hi_pwm <= 4 * 162, $sformatf("pwm duty forward %0d", hi_pwm));
    check(dir[0] == 1'b0, "forward direction");
    check(dir[1] == 1'b1, "axis 1 reverse direction (set-point below position)");
    check(gate_edges > 4, "space-vector gates switch");
    // soft CPU port
    @(negedge clk); cpu_req = 1; cpu_we = 2'b11; cpu_addr = 9'd300; cpu_wdata = 16'hBEEF;
    do @(posedge clk); while (!cpu_gnt);
    @(negedge clk); cpu_we = 0;
    do @(posedge clk); while (!cpu_gnt);
    @(negedge clk); cpu_req = 0;
    check(cpu_rvalid && cpu_rdata == 16'hBEEF, "soft CPU read back");
    // stop the frames: the watchdog switches the motors off
    repeat (60000) @(negedge clk);
    check(wd_expired, "watchdog expired");
    hi_pwm = 0; gate_edges = 0;
    repeat (2048) @(negedge clk);
    check(hi_pwm == 0 && gate_edges == 0, "motor outputs off after timeout");
    frame();
    repeat (10) @(negedge clk);
    check(!wd_expired, "new frame clears watchdog");
    check(link_errors == 0 && hub_lerr == 0, "no link errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
