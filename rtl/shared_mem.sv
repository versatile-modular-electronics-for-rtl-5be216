// Dual-port shared memory of an FPGA module.
//
// The document joins the communication block, the sensor chain and the
// controllers through shared memory. Here it is a true dual-port RAM of
// DEPTH words of DW bits with per-byte write enables: port A is given to the
// communication node (which needs one access per clock while a sub-frame
// passes), port B sits behind the memory bus arbiter. Both ports read
// synchronously (data one clock after the address). A write and a read of
// the same word on the two ports in one clock return the old word on the
// reading port. The memory is cleared by its initial contents only.
module shared_mem #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = DW / 8
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic [BW-1:0] a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic [BW-1:0] b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int b = 0; b < BW; b++)
        if (a_we[b]) mem[a_addr][b*8 +: 8] <= a_wdata[b*8 +: 8];
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      for (int b = 0; b < BW; b++)
        if (b_we[b]) mem[b_addr][b*8 +: 8] <= b_wdata[b*8 +: 8];
      b_rdata <= mem[b_addr];
    end
  end

endmodule
