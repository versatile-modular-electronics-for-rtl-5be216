// Synchronous FIFO of link symbols.
//
// Holds the forwarded downstream stream of a module so it can be re-sent a few
// bytes later on the next link. Plain circular buffer with a fill count; a
// push to a full FIFO is dropped and counted in `overflow`, a pop from an
// empty one returns the last entry. The document states only that the packet
// is "put into a FIFO and buffered for 4 bytes"; the depth is this design's.
module sym_fifo
  import comm_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  sym_t                     din,
  input  logic                     pop,
  output sym_t                     dout,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  sym_t          mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign do_pop  = pop && (count != '0);
  assign do_push = push && (count != (AW+1)'(DEPTH) || do_pop);
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
    end
  end

endmodule
