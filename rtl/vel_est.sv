// Velocity estimate from a position signal.
//
// On every `sample` tick the velocity becomes the position change since the
// previous tick, in counts per sample period, computed with wrap-around so a
// wrapping encoder counter gives the right sign. The output is registered and
// valid the clock after the tick. The document has a "Vel" block next to each
// "Pos" block; differencing over a fixed period is this design's choice.
module vel_est #(
  parameter int unsigned PW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample,
  input  logic signed [PW-1:0] pos,
  output logic signed [PW-1:0] vel,
  output logic                 vel_valid
);

  logic signed [PW-1:0] last;
  logic                 primed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= '0;
      vel       <= '0;
      vel_valid <= 1'b0;
      primed    <= 1'b0;
    end else begin
      vel_valid <= 1'b0;
      if (sample) begin
        last      <= pos;
        primed    <= 1'b1;
        vel       <= primed ? pos - last : '0;
        vel_valid <= 1'b1;
      end
    end
  end

endmodule
