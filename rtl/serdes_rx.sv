// Deserializer with comma alignment for one LVDS lane.
//
// Registers the incoming line once, shifts it into a 10-bit window and looks
// for the K28.5 comma in either disparity. A comma fixes the word boundary;
// from then on a word is delivered every ten clocks. Every later comma
// re-checks the boundary, so the lane re-aligns after a slip. The document
// names the SerDes only; comma alignment on K28.5 is this design's choice.
//
// Interface: line in (one bit per clock, first bit is code bit 9), word_valid
// pulses with the 10-bit word; aligned is high once a comma has been seen.
module serdes_rx
  import comm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       line,
  output logic       word_valid,
  output logic [9:0] word,
  output logic       aligned
);

  logic       line_q;
  logic [9:0] sr, sr_next;
  logic [3:0] cnt;
  logic       comma;

  assign sr_next = {sr[8:0], line_q};
  assign comma   = (sr_next == COMMA_NEG) || (sr_next == COMMA_POS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_q     <= 1'b0;
      sr         <= '0;
      cnt        <= '0;
      aligned    <= 1'b0;
      word_valid <= 1'b0;
      word       <= '0;
    end else begin
      line_q     <= line;
      sr         <= sr_next;
      word_valid <= 1'b0;
      if (comma || (aligned && cnt == 4'd9)) begin
        word_valid <= 1'b1;
        word       <= sr_next;
        cnt        <= '0;
        aligned    <= 1'b1;
      end else begin
        cnt <= (cnt == 4'd9) ? 4'd0 : cnt + 4'd1;
      end
    end
  end

endmodule
