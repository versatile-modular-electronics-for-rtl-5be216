// Bus master that copies a block of shared memory into registers.
//
// On each `tick` it reads NW consecutive words starting at BASE through the
// memory bus, one request at a time, and updates `words` as each read
// returns; `busy` is high while a pass is running. The FPGA module uses it to
// fetch the set-points, gains and LED pattern that the central controller
// wrote into the receive area. A pass may see a sub-frame that is being
// written at the same time (no double buffering).
module param_reader #(
  parameter int unsigned NW = 10,
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 16,
  parameter int unsigned BASE = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  // bus master
  output logic          req,
  output logic [AW-1:0] addr,
  input  logic          gnt,
  input  logic          rvalid,
  input  logic [DW-1:0] rdata,
  // result
  output logic [DW-1:0] words [NW],
  output logic          busy
);

  localparam int unsigned IW = $clog2(NW + 1);
  logic [IW-1:0] i, ri;

  assign req  = busy && (i < IW'(NW));
  assign addr = AW'(BASE) + AW'(i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      i    <= '0;
      ri   <= '0;
      for (int k = 0; k < NW; k++) words[k] <= '0;
    end else begin
      if (!busy && tick) begin
        busy <= 1'b1;
        i    <= '0;
        ri   <= '0;
      end else if (busy) begin
        if (req && gnt) i <= i + 1'b1;
        if (rvalid) begin
          words[ri] <= rdata;
          ri        <= ri + 1'b1;
          if (ri == IW'(NW - 1)) busy <= 1'b0;
        end
      end
    end
  end

endmodule
