// Humanoid electronics network: central hub and its chains of limb modules.
//
// The central controller's FPGA (central_hub) has N_PORTS high-speed ports.
// Port p drives a daisy chain of CHAIN[p] limb FPGA modules (fpga_module):
// module j of the chain takes its upstream line from module j-1 (or the hub)
// and returns on the same cable; the last module of each chain closes the
// loop. The default chains, 2+3+3+1+2+2, give the 13 modules of the
// document's humanoid (head and neck, two arms of three, pelvis, two legs of
// two); the chain lengths read from its overview drawing are this design's
// reading, as is the module ID scheme: module j of port p has ID 16 p + j + 1
// and is addressed by sub-frame j of that port's frame.
// All module-side I/O (encoders, ADC samples, motor outputs, LEDs, soft CPU
// port) and the host side of the hub are brought out as arrays indexed
// [port][position]; entries beyond a chain's length are unused (outputs 0).
// The soft CPU of each module and the processor of the hub are external.
module humanoid_net_top
  import comm_pkg::*;
#(
  parameter int unsigned N_PORTS = 6,
  parameter int unsigned N_SUB   = 4,
  parameter int unsigned CHAIN [N_PORTS] = '{2, 3, 3, 1, 2, 2},
  parameter int unsigned COMM_DIV   = 200_000,
  parameter int unsigned WD_TIMEOUT = 1_000_000,
  parameter int unsigned CTRL_DIV   = 40_000,
  parameter int unsigned ADC_DIV    = 625,
  parameter int unsigned TEMP_DIV   = 4_000_000,
  parameter int unsigned SVM_HALF   = 5000,
  parameter int unsigned PWM_PERIOD = 8192,
  localparam int unsigned PW  = $clog2(N_PORTS),
  localparam int unsigned HAW = $clog2(N_SUB * MAX_PAYLOAD),
  localparam int unsigned NSW = $clog2(N_SUB + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // hub processor side
  input  logic               host_we,
  input  logic [PW-1:0]      host_port,
  input  logic [HAW-1:0]     host_addr,
  input  logic [7:0]         host_wdata,
  output logic [7:0]         host_rdata,
  input  logic [NSW-1:0]     n_sub    [N_PORTS],
  input  logic [7:0]         sub_type [N_PORTS][N_SUB],
  input  logic               host_send,
  input  logic               auto_send,
  output logic               comm_tick,
  output logic               busy         [N_PORTS],
  output logic               done         [N_PORTS],
  output logic [31:0]        frame_cycles [N_PORTS],
  output logic [7:0]         ret_flag     [N_PORTS][N_SUB],
  output logic               ret_ok       [N_PORTS][N_SUB],
  output logic [15:0]        hub_link_errors [N_PORTS],
  // limb module side, [port][position]
  input  logic [1:0]         enc_a       [N_PORTS][N_SUB],
  input  logic [1:0]         enc_b       [N_PORTS][N_SUB],
  input  logic signed [15:0] abs_pos     [N_PORTS][N_SUB][2],
  input  logic signed [15:0] adc_torque  [N_PORTS][N_SUB][2],
  input  logic signed [15:0] adc_current [N_PORTS][N_SUB][2],
  input  logic signed [15:0] v_alpha     [N_PORTS][N_SUB][2],
  input  logic signed [15:0] v_beta      [N_PORTS][N_SUB][2],
  output logic [1:0]         pwm         [N_PORTS][N_SUB],
  output logic [1:0]         dir         [N_PORTS][N_SUB],
  output logic [2:0]         gate_hi     [N_PORTS][N_SUB][2],
  output logic [2:0]         gate_lo     [N_PORTS][N_SUB][2],
  output logic [16:0]        leds        [N_PORTS][N_SUB],
  output logic               adc_tick    [N_PORTS][N_SUB],
  output logic               temp_tick   [N_PORTS][N_SUB],
  input  logic               cpu_req     [N_PORTS][N_SUB],
  input  logic [1:0]         cpu_we      [N_PORTS][N_SUB],
  input  logic [8:0]         cpu_addr    [N_PORTS][N_SUB],
  input  logic [15:0]        cpu_wdata   [N_PORTS][N_SUB],
  output logic               cpu_gnt     [N_PORTS][N_SUB],
  output logic               cpu_rvalid  [N_PORTS][N_SUB],
  output logic [15:0]        cpu_rdata   [N_PORTS][N_SUB],
  output logic               in_frame    [N_PORTS][N_SUB],
  output logic               rx_update   [N_PORTS][N_SUB],
  output logic               wd_expired  [N_PORTS][N_SUB],
  output logic [15:0]        link_errors [N_PORTS][N_SUB]
);

  logic       h_tx [N_PORTS], h_rx [N_PORTS];
  logic [7:0] sub_id [N_PORTS][N_SUB];

  central_hub #(.N_PORTS(N_PORTS), .N_SUB(N_SUB), .COMM_DIV(COMM_DIV)) u_hub (
    .clk, .rst_n,
    .host_we, .host_port, .host_addr, .host_wdata, .host_rdata,
    .n_sub, .sub_id, .sub_type, .host_send, .auto_send, .comm_tick,
    .busy, .done, .frame_cycles, .ret_flag, .ret_ok,
    .link_errors (hub_link_errors),
    .tx_line (h_tx), .rx_line (h_rx)
  );

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    logic up_tx [N_SUB], dn_tx [N_SUB];

    for (genvar j = 0; j < N_SUB; j++) begin : g_mod
      assign sub_id[p][j] = 8'(16 * p + j + 1);
      if (j < CHAIN[p]) begin : g_on
        logic up_rx, dn_rx;
        if (j == 0) begin : g_first
          assign up_rx = h_tx[p];
        end else begin : g_next
          assign up_rx = dn_tx[j-1];
        end
        if (j + 1 < CHAIN[p]) begin : g_mid
          assign dn_rx = up_tx[j+1];
        end else begin : g_last
          assign dn_rx = 1'b0;
        end

        fpga_module #(
          .WD_TIMEOUT (WD_TIMEOUT), .CTRL_DIV (CTRL_DIV), .ADC_DIV (ADC_DIV),
          .TEMP_DIV (TEMP_DIV), .SVM_HALF (SVM_HALF), .PWM_PERIOD (PWM_PERIOD)
        ) u_module (
          .clk, .rst_n,
          .my_id    (sub_id[p][j]),
          .loopback (j + 1 == CHAIN[p]),
          .up_rx, .up_tx (up_tx[j]), .dn_tx (dn_tx[j]), .dn_rx,
          .enc_a (enc_a[p][j]), .enc_b (enc_b[p][j]),
          .abs_pos (abs_pos[p][j]), .adc_torque (adc_torque[p][j]),
          .adc_current (adc_current[p][j]),
          .adc_tick (adc_tick[p][j]), .temp_tick (temp_tick[p][j]),
          .pwm (pwm[p][j]), .dir (dir[p][j]),
          .v_alpha (v_alpha[p][j]), .v_beta (v_beta[p][j]),
          .gate_hi (gate_hi[p][j]), .gate_lo (gate_lo[p][j]),
          .leds (leds[p][j]),
          .cpu_req (cpu_req[p][j]), .cpu_we (cpu_we[p][j]), .cpu_addr (cpu_addr[p][j]),
          .cpu_wdata (cpu_wdata[p][j]), .cpu_gnt (cpu_gnt[p][j]),
          .cpu_rvalid (cpu_rvalid[p][j]), .cpu_rdata (cpu_rdata[p][j]),
          .in_frame (in_frame[p][j]), .rx_update (rx_update[p][j]),
          .wd_expired (wd_expired[p][j]), .link_errors (link_errors[p][j])
        );
      end else begin : g_off
        assign up_tx[j] = 1'b0;
        assign dn_tx[j] = 1'b0;
        assign pwm[p][j] = '0;
        assign dir[p][j] = '0;
        assign gate_hi[p][j] = '{default: '0};
        assign gate_lo[p][j] = '{default: '0};
        assign leds[p][j] = '0;
        assign adc_tick[p][j] = 1'b0;
        assign temp_tick[p][j] = 1'b0;
        assign cpu_gnt[p][j] = 1'b0;
        assign cpu_rvalid[p][j] = 1'b0;
        assign cpu_rdata[p][j] = '0;
        assign in_frame[p][j] = 1'b0;
        assign rx_update[p][j] = 1'b0;
        assign wd_expired[p][j] = 1'b0;
        assign link_errors[p][j] = '0;
      end
    end

    if (CHAIN[p] == 0) begin : g_empty
      assign h_rx[p] = h_tx[p];
    end else begin : g_chain
      assign h_rx[p] = up_tx[0];
    end
  end

endmodule
