// Memory bus: round-robin arbiter in front of one memory port.
//
// Several bus masters (sensor writer, controllers, the soft CPU) each hold
// `req` with an address, write data and byte enables until they see `gnt`.
// One request is granted per clock, rotating the priority so each master is
// served within N clocks. The read data of a granted access is valid one clock
// after gnt, flagged by rvalid for that master. The document draws a "Memory
// Bus" joining all blocks; arbitration scheme and timing are this design's.
module mem_bus #(
  parameter int unsigned N  = 3,
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 16,
  localparam int unsigned BW = DW / 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req    [N],
  input  logic [BW-1:0] we     [N],
  input  logic [AW-1:0] addr   [N],
  input  logic [DW-1:0] wdata  [N],
  output logic          gnt    [N],
  output logic          rvalid [N],
  output logic [DW-1:0] rdata,
  // memory side
  output logic          m_en,
  output logic [BW-1:0] m_we,
  output logic [AW-1:0] m_addr,
  output logic [DW-1:0] m_wdata,
  input  logic [DW-1:0] m_rdata
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] prio, sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = prio;
    for (int k = N - 1; k >= 0; k--) begin
      int unsigned i;
      i = (int'(prio) + k) % N;
      if (req[i]) begin
        any = 1'b1;
        sel = IW'(i);
      end
    end
    for (int i = 0; i < N; i++) gnt[i] = any && (sel == IW'(i));
    m_en    = any;
    m_we    = any ? we[sel] : '0;
    m_addr  = addr[sel];
    m_wdata = wdata[sel];
  end

  assign rdata = m_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio <= '0;
      for (int i = 0; i < N; i++) rvalid[i] <= 1'b0;
    end else begin
      for (int i = 0; i < N; i++) rvalid[i] <= gnt[i];
      if (any) prio <= (sel == IW'(N - 1)) ? '0 : sel + 1'b1;
    end
  end

  // A master must keep its request until it is granted.
  for (genvar g = 0; g < N; g++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             req[g] && !gnt[g] |=> req[g])
      else $error("mem_bus: master %0d dropped its request", g);
  end

endmodule
