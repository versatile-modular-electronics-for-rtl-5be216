// Bus master that stores a set of sensor values in shared memory.
//
// On each `tick` it takes a snapshot of the NV input values and writes them
// to NV consecutive words from BASE through the memory bus, one word per
// grant. This is how processed sensor data reaches the transmit area that the
// communication node sends to the central controller, and how the soft CPU
// would see it; the document places processed sensor values in shared memory
// without saying how.
module sensor_writer #(
  parameter int unsigned NV = 12,
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 16,
  parameter int unsigned BASE = 128
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic [DW-1:0] values [NV],
  // bus master
  output logic          req,
  output logic [AW-1:0] addr,
  output logic [DW-1:0] wdata,
  input  logic          gnt,
  output logic          busy
);

  localparam int unsigned IW = $clog2(NV + 1);
  logic [IW-1:0] i;
  logic [DW-1:0] snap [NV];

  assign req   = busy;
  assign addr  = AW'(BASE) + AW'(i);
  assign wdata = snap[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      i    <= '0;
      for (int k = 0; k < NV; k++) snap[k] <= '0;
    end else begin
      if (!busy && tick) begin
        busy <= 1'b1;
        i    <= '0;
        for (int k = 0; k < NV; k++) snap[k] <= values[k];
      end else if (busy && gnt) begin
        i <= i + 1'b1;
        if (i == IW'(NV - 1)) busy <= 1'b0;
      end
    end
  end

endmodule
