// Limb FPGA module: communication node, shared memory and the per-limb
// sensor and motor logic, all running in parallel.
//
// This is the logic of the standard FPGA module as configured for a two-joint
// limb (the document's "High Current BLDC Controller" structure, with the PID
// and PWM channel of its eye-drive setup). Blocks:
//  * node_ctrl on the two LVDS links takes the module's sub-frame out of each
//    passing frame into the receive area of shared memory and puts the
//    transmit area back into it;
//  * shared_mem: port A for the node, port B behind mem_bus, whose masters are
//    the sensor writer, the parameter reader and the soft CPU port;
//  * per axis ("Sensors x2"): quadrature decoder (motor encoder position),
//    absolute encoder position from a port, a velocity estimate of each, and
//    a Butterworth filter behind each of the six values; torque and motor
//    current samples from the ADC ports are filtered at the 320 kHz ADC rate;
//  * per axis ("Motor x2"): PID position loop on the filtered encoder
//    position at the 24.4 kHz PWM rate driving a sign-magnitude PWM output,
//    and a space-vector PWM stage for the six bridge gates whose voltage
//    vector comes from the (external) current controller;
//  * a watchdog that switches all motor outputs off when no sub-frame has
//    arrived for WD_TIMEOUT clocks; tick generators for the loop rates;
//    17 LEDs set by the central controller.
// Block list, sensor set, rates and LED count follow the document; the memory
// map (fpga_map_pkg), the wiring of controller, watchdog and LEDs and the
// filter placement for velocities are this design's.
// Timing: one clock is one LVDS bit (200 MHz). Sensor values reach shared
// memory on every 5 kHz control tick; set-points are fetched on the same tick.
module fpga_module
  import fpga_map_pkg::*;
#(
  parameter int unsigned WD_TIMEOUT = 1_000_000,          // 5 ms
  parameter int unsigned CTRL_DIV   = CLK_HZ / CTRL_HZ,   // 40000
  parameter int unsigned ADC_DIV    = CLK_HZ / ADC_HZ,    // 625
  parameter int unsigned TEMP_DIV   = CLK_HZ / TEMP_HZ,   // 4,000,000
  parameter int unsigned SVM_HALF   = CLK_HZ / SVM_HZ / 2,// 5000
  parameter int unsigned PWM_PERIOD = PID_PERIOD          // 8192
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         my_id,
  input  logic               loopback,
  // LVDS links
  input  logic               up_rx,
  output logic               up_tx,
  output logic               dn_tx,
  input  logic               dn_rx,
  // sensors
  input  logic [1:0]         enc_a,
  input  logic [1:0]         enc_b,
  input  logic signed [15:0] abs_pos     [2],  // absolute encoder words
  input  logic signed [15:0] adc_torque  [2],  // ADC samples, joint torque
  input  logic signed [15:0] adc_current [2],  // ADC samples, motor current
  output logic               adc_tick,         // 320 kHz conversion start
  output logic               temp_tick,        // 50 Hz temperature read
  // motor outputs
  output logic [1:0]         pwm,
  output logic [1:0]         dir,
  input  logic signed [15:0] v_alpha     [2],  // from the current controller
  input  logic signed [15:0] v_beta      [2],
  output logic [2:0]         gate_hi     [2],
  output logic [2:0]         gate_lo     [2],
  output logic [16:0]        leds,
  // soft CPU port on the memory bus
  input  logic               cpu_req,
  input  logic [1:0]         cpu_we,
  input  logic [8:0]         cpu_addr,
  input  logic [15:0]        cpu_wdata,
  output logic               cpu_gnt,
  output logic               cpu_rvalid,
  output logic [15:0]        cpu_rdata,
  // status
  output logic               in_frame,
  output logic               rx_update,
  output logic               wd_expired,
  output logic [15:0]        link_errors
);

  // --- communication node and shared memory port A -------------------------
  logic        n_en, n_we, n_rx_err, n_byte_sel;
  logic [9:0]  n_addr;
  logic [7:0]  n_wdata, n_rdata, n_rx_type;
  logic [15:0] a_rdata, proto_errors;

  node_ctrl #(.AW(10), .RX_BASE(2 * RX_WORD), .TX_BASE(2 * TX_WORD)) u_node (
    .clk, .rst_n, .my_id, .loopback,
    .up_rx, .up_tx, .dn_tx, .dn_rx,
    .mem_en (n_en), .mem_we (n_we), .mem_addr (n_addr),
    .mem_wdata (n_wdata), .mem_rdata (n_rdata),
    .in_frame, .rx_update, .rx_type (n_rx_type), .rx_error (n_rx_err),
    .proto_errors, .link_errors
  );

  always_ff @(posedge clk) if (n_en) n_byte_sel <= n_addr[0];
  assign n_rdata = n_byte_sel ? a_rdata[15:8] : a_rdata[7:0];

  // --- memory bus: 0 sensor writer, 1 parameter reader, 2 soft CPU ----------
  localparam int unsigned NM = 3;
  logic        b_req [NM], b_gnt [NM], b_rvalid [NM];
  logic [1:0]  b_we  [NM];
  logic [8:0]  b_addr [NM];
  logic [15:0] b_wdata [NM], b_rdata;
  logic        m_en;
  logic [1:0]  m_we;
  logic [8:0]  m_addr;
  logic [15:0] m_wdata, m_rdata;

  shared_mem #(.DW(16), .DEPTH(MEM_WORDS)) u_mem (
    .clk,
    .a_en (n_en), .a_we ({n_we && n_addr[0], n_we && !n_addr[0]}),
    .a_addr (n_addr[9:1]), .a_wdata ({n_wdata, n_wdata}), .a_rdata,
    .b_en (m_en), .b_we (m_we), .b_addr (m_addr), .b_wdata (m_wdata), .b_rdata (m_rdata)
  );

  mem_bus #(.N(NM), .AW(9), .DW(16)) u_bus (
    .clk, .rst_n,
    .req (b_req), .we (b_we), .addr (b_addr), .wdata (b_wdata),
    .gnt (b_gnt), .rvalid (b_rvalid), .rdata (b_rdata),
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata
  );

  assign b_req[2]   = cpu_req;
  assign b_we[2]    = cpu_we;
  assign b_addr[2]  = cpu_addr;
  assign b_wdata[2] = cpu_wdata;
  assign cpu_gnt    = b_gnt[2];
  assign cpu_rvalid = b_rvalid[2];
  assign cpu_rdata  = b_rdata;

  // --- timers -----------------------------------------------------------------
  logic ctrl_tick;
  tick_gen #(.DIV(CTRL_DIV)) u_t_ctrl (.clk, .rst_n, .sync (1'b0), .tick (ctrl_tick));
  tick_gen #(.DIV(ADC_DIV))  u_t_adc  (.clk, .rst_n, .sync (1'b0), .tick (adc_tick));
  tick_gen #(.DIV(TEMP_DIV)) u_t_temp (.clk, .rst_n, .sync (1'b0), .tick (temp_tick));

  // --- watchdog ------------------------------------------------------------------
  watchdog #(.TIMEOUT(WD_TIMEOUT)) u_wd (
    .clk, .rst_n, .enable (1'b1), .kick (rx_update), .expired (wd_expired)
  );

  // --- parameters from the central controller ------------------------------------
  logic [15:0] prm [N_PARAM];
  logic        prm_busy;

  param_reader #(.NW(N_PARAM), .AW(9), .DW(16), .BASE(RX_WORD)) u_prm (
    .clk, .rst_n, .tick (ctrl_tick),
    .req (b_req[1]), .addr (b_addr[1]), .gnt (b_gnt[1]), .rvalid (b_rvalid[1]),
    .rdata (b_rdata), .words (prm), .busy (prm_busy)
  );
  assign b_we[1]    = '0;
  assign b_wdata[1] = '0;

  assign leds = {prm[W_CTRL][0], prm[W_LED_LO]};

  // --- sensors and motors, per axis ----------------------------------------------
  logic [15:0] sens [N_SENS];
  logic [1:0]  axis_en;
  logic [15:0] rx_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rx_count <= '0;
    else if (rx_update) rx_count <= rx_count + 16'd1;
  end

  for (genvar a = 0; a < 2; a++) begin : g_axis
    logic signed [15:0] qpos, mvel, avel, f_mpos, f_mvel, f_apos, f_avel, f_trq, f_cur;
    logic [15:0]        qerr;
    logic               mv_v, av_v, fv0, fv1, fv2, fv3, fv4, fv5;
    logic signed [13:0] u;
    logic               u_valid, pwm_start, svm_start;
    logic [15:0]        svm_duty [3];

    quad_decoder #(.PW(16)) u_quad (
      .clk, .rst_n, .enc_a (enc_a[a]), .enc_b (enc_b[a]), .pos (qpos), .errors (qerr)
    );
    vel_est #(.PW(16)) u_mvel (
      .clk, .rst_n, .sample (ctrl_tick), .pos (qpos), .vel (mvel), .vel_valid (mv_v)
    );
    vel_est #(.PW(16)) u_avel (
      .clk, .rst_n, .sample (ctrl_tick), .pos (abs_pos[a]), .vel (avel), .vel_valid (av_v)
    );
    // Positions and ADC values: 5 kHz cut-off at the 320 kHz sensor rate.
    biquad u_f_mpos (.clk, .rst_n, .in_valid (adc_tick), .x (qpos),           .out_valid (fv0), .y (f_mpos));
    biquad u_f_apos (.clk, .rst_n, .in_valid (adc_tick), .x (abs_pos[a]),     .out_valid (fv2), .y (f_apos));
    biquad u_f_trq  (.clk, .rst_n, .in_valid (adc_tick), .x (adc_torque[a]),  .out_valid (fv4), .y (f_trq));
    biquad u_f_cur  (.clk, .rst_n, .in_valid (adc_tick), .x (adc_current[a]), .out_valid (fv5), .y (f_cur));
    // Velocities: 500 Hz cut-off at the 5 kHz velocity rate.
    biquad #(.B0(27'sd1131712), .B1(27'sd2263423), .B2(27'sd1131712),
             .A1(-27'sd19176031), .A2(27'sd6925662))
      u_f_mvel (.clk, .rst_n, .in_valid (mv_v), .x (mvel), .out_valid (fv1), .y (f_mvel));
    biquad #(.B0(27'sd1131712), .B1(27'sd2263423), .B2(27'sd1131712),
             .A1(-27'sd19176031), .A2(27'sd6925662))
      u_f_avel (.clk, .rst_n, .in_valid (av_v), .x (avel), .out_valid (fv3), .y (f_avel));

    assign sens[6*a + 0] = f_mpos;
    assign sens[6*a + 1] = f_mvel;
    assign sens[6*a + 2] = f_apos;
    assign sens[6*a + 3] = f_avel;
    assign sens[6*a + 4] = f_trq;
    assign sens[6*a + 5] = f_cur;

    assign axis_en[a] = prm[W_CTRL][1 + a] && !wd_expired;

    pid #(.DW(16), .GW(16), .UW(14), .SHIFT(8)) u_pid (
      .clk, .rst_n, .tick (pwm_start), .enable (axis_en[a]),
      .setpoint (prm[W_SP0 + a]), .feedback (f_mpos),
      .kp (prm[W_GAIN0 + 3*a]), .ki (prm[W_GAIN0 + 3*a + 1]), .kd (prm[W_GAIN0 + 3*a + 2]),
      .u, .u_valid
    );

    pwm_gen #(.PERIOD(PWM_PERIOD), .UW(14)) u_pwm (
      .clk, .rst_n, .enable (axis_en[a]), .cmd (u),
      .pwm (pwm[a]), .dir (dir[a]), .period_start (pwm_start)
    );

    svpwm #(.HALF(SVM_HALF)) u_svm (
      .clk, .rst_n, .enable (prm[W_CTRL][3] && !wd_expired),
      .v_alpha (v_alpha[a]), .v_beta (v_beta[a]),
      .gate_hi (gate_hi[a]), .gate_lo (gate_lo[a]),
      .period_start (svm_start), .duty (svm_duty)
    );
  end

  assign sens[12] = {13'd0, axis_en, wd_expired};
  assign sens[13] = rx_count;

  sensor_writer #(.NV(N_SENS), .AW(9), .DW(16), .BASE(TX_WORD)) u_sw (
    .clk, .rst_n, .tick (ctrl_tick), .values (sens),
    .req (b_req[0]), .addr (b_addr[0]), .wdata (b_wdata[0]), .gnt (b_gnt[0]), .busy ()
  );
  assign b_we[0] = 2'b11;

endmodule
