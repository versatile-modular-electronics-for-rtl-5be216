// Quadrature encoder decoder.
//
// Synchronises the A/B encoder channels with two flip-flops each and decodes
// every edge (four counts per encoder line). The position is a wrapping
// PW-bit up/down counter; a clock in which both channels change is an
// impossible step and is counted in `errors` without moving the position.
// The document lists quadrature and incremental encoders and a position
// ("Pos") block per encoder; 4x decoding and the counter width are this
// design's choices. Position changes two clocks after the encoder edge.
module quad_decoder #(
  parameter int unsigned PW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enc_a,
  input  logic                 enc_b,
  output logic signed [PW-1:0] pos,
  output logic [15:0]          errors
);

  logic [1:0] sa, sb;      // synchronisers
  logic [1:0] prev, cur;

  assign cur = {sa[1], sb[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa     <= '0;
      sb     <= '0;
      prev   <= '0;
      pos    <= '0;
      errors <= '0;
    end else begin
      sa   <= {sa[0], enc_a};
      sb   <= {sb[0], enc_b};
      prev <= cur;
      // Gray sequence 00 -> 10 -> 11 -> 01 -> 00 counts up (A leads B).
      unique case ({prev, cur})
        4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: pos <= pos + 1'b1;
        4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: pos <= pos - 1'b1;
        4'b00_11, 4'b11_00, 4'b01_10, 4'b10_01: errors <= errors + 16'd1;
        default: ;
      endcase
    end
  end

endmodule
