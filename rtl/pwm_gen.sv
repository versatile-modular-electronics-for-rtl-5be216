// Sign-magnitude PWM generator for a motor driver.
//
// A free-running counter of PERIOD clocks sets the PWM frequency; the signed
// command is sampled at the start of each period, its magnitude (clamped to
// PERIOD) sets how many clocks `pwm` is high and its sign drives `dir`. With
// `enable` low the output stays low. PERIOD = 8192 at 200 MHz gives 24.4 kHz,
// the PID rate the document reports; that pairing, the sign-magnitude drive
// and the resolution are this design's choices. `period_start` pulses in the
// first clock of each period and can tick the controller.
module pwm_gen #(
  parameter int unsigned PERIOD = 8192,
  parameter int unsigned UW     = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic signed [UW-1:0] cmd,
  output logic                 pwm,
  output logic                 dir,
  output logic                 period_start
);

  localparam int unsigned CW = $clog2(PERIOD);
  logic [CW-1:0] cnt;
  logic [UW-1:0] mag, duty;

  assign mag          = cmd[UW-1] ? UW'(-cmd) : UW'(cmd);
  assign period_start = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      duty <= '0;
      dir  <= 1'b0;
      pwm  <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      if (cnt == '0) begin
        duty <= (32'(mag) > PERIOD) ? UW'(PERIOD) : mag;
        dir  <= cmd[UW-1];
      end
      pwm <= enable && (32'(cnt) < 32'(duty));
    end
  end

endmodule
