// Periodic tick generator (global timer).
//
// Divides the clock by DIV and pulses `tick` for one clock every DIV clocks,
// the first tick DIV clocks after reset or after `sync`. The FPGA module uses
// one per loop rate named in the document (5 kHz control loop, 1 kHz
// communication, 20 kHz space-vector PWM, 24.4 kHz PID, 320 kHz ADC sampling,
// 50 Hz temperature); the divider form is this design's.
module tick_gen #(
  parameter int unsigned DIV = 40_000   // 5 kHz at 200 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sync,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (sync) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(DIV - 1));
      cnt  <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
