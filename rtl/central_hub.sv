// FPGA fabric of the central controller: the master of the module network.
//
// N_PORTS independent high-speed ports, each a hub_port that sends a frame of
// up to N_SUB sub-frames down its chain of modules and checks what comes
// back. A frame starts on all ports at once, either on `host_send` from the
// processor or, with `auto_send` set, on every tick of the internal interval
// timer (1 kHz by default, the document's communication rate with the
// limbs). The processor reaches the buffers of one port at a time through a
// byte-wide port selected by `host_port`; read data follows one clock after
// the address. Port count (six, as the text states) and communication rate
// are the document's; the per-port engines, the shared start and the host
// port are this design's.
module central_hub
  import comm_pkg::*;
#(
  parameter int unsigned N_PORTS  = 6,
  parameter int unsigned N_SUB    = 4,
  parameter int unsigned COMM_DIV = 200_000,   // 1 kHz at 200 MHz
  localparam int unsigned PW      = $clog2(N_PORTS),
  localparam int unsigned HAW     = $clog2(N_SUB * MAX_PAYLOAD),
  localparam int unsigned NSW     = $clog2(N_SUB + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // processor side
  input  logic            host_we,
  input  logic [PW-1:0]   host_port,
  input  logic [HAW-1:0]  host_addr,
  input  logic [7:0]      host_wdata,
  output logic [7:0]      host_rdata,
  input  logic [NSW-1:0]  n_sub    [N_PORTS],
  input  logic [7:0]      sub_id   [N_PORTS][N_SUB],
  input  logic [7:0]      sub_type [N_PORTS][N_SUB],
  input  logic            host_send,
  input  logic            auto_send,
  output logic            comm_tick,
  output logic            busy         [N_PORTS],
  output logic            done         [N_PORTS],
  output logic [31:0]     frame_cycles [N_PORTS],
  output logic [7:0]      ret_flag     [N_PORTS][N_SUB],
  output logic            ret_ok       [N_PORTS][N_SUB],
  output logic [15:0]     link_errors  [N_PORTS],
  // LVDS lines
  output logic            tx_line [N_PORTS],
  input  logic            rx_line [N_PORTS]
);

  logic       send;
  logic [7:0] rdata [N_PORTS];
  logic [PW-1:0] rsel;

  tick_gen #(.DIV(COMM_DIV)) u_timer (.clk, .rst_n, .sync (1'b0), .tick (comm_tick));

  assign send = host_send || (auto_send && comm_tick);

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    hub_port #(.N_SUB(N_SUB)) u_port (
      .clk, .rst_n,
      .host_we    (host_we && host_port == PW'(p)),
      .host_addr, .host_wdata,
      .host_rdata (rdata[p]),
      .n_sub      (n_sub[p]),
      .sub_id     (sub_id[p]),
      .sub_type   (sub_type[p]),
      .send,
      .busy       (busy[p]),
      .done       (done[p]),
      .frame_cycles (frame_cycles[p]),
      .ret_flag   (ret_flag[p]),
      .ret_ok     (ret_ok[p]),
      .link_errors (link_errors[p]),
      .tx_line    (tx_line[p]),
      .rx_line    (rx_line[p])
    );
  end

  always_ff @(posedge clk) rsel <= host_port;
  assign host_rdata = rdata[rsel];

endmodule
