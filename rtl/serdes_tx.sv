// Serializer for one LVDS lane.
//
// Shifts a 10-bit 8b/10b code word out one bit per clock, bit 9 ("a") first,
// so the clock is the line bit clock (200 MHz for the document's 200 Mb/s
// links; the document does not say how its SerDes is clocked). A free-running
// bit counter marks word boundaries. Two clocks before each boundary it pulses
// req, asking for the next code word, which must be on `word` at the boundary
// (link_tx feeds it through a one-clock encoder). The line always carries a
// word, so a source with nothing to send must supply an idle code.
module serdes_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] word,
  output logic       req,       // next word is sampled two clocks later
  output logic       line       // serial output
);

  logic [3:0] cnt;
  logic [9:0] sh;

  assign req  = (cnt == 4'd7);
  assign line = sh[9];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sh  <= '0;
    end else begin
      if (cnt == 4'd9) begin
        cnt <= '0;
        sh  <= word;
      end else begin
        cnt <= cnt + 4'd1;
        sh  <= {sh[8:0], 1'b0};
      end
    end
  end

endmodule
