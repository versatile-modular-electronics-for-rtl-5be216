// Watchdog timer.
//
// Counts clocks since the last `kick`; after TIMEOUT clocks without one it
// raises `expired` and holds it until the next kick. In the FPGA module it is
// kicked by every sub-frame the module receives from the central controller
// and its expiry switches the motor outputs off. The document only names the
// watchdogs; what kicks them and what they stop is this design's choice.
module watchdog #(
  parameter int unsigned TIMEOUT = 200_000   // 1 ms at 200 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic kick,
  output logic expired
);

  localparam int unsigned CW = $clog2(TIMEOUT + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      expired <= 1'b0;
    end else if (!enable || kick) begin
      cnt     <= '0;
      expired <= 1'b0;
    end else if (cnt == CW'(TIMEOUT - 1)) begin
      expired <= 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
