// PID position controller.
//
// On each `tick` (the loop rate; 24.4 kHz in the document's eye-drive setup)
// it computes e = setpoint - feedback and
//   u = (KP e + KI sum(e) + KD (e - e_prev)) >>> SHIFT,
// clamps the integral to +-IMAX (anti-windup) and saturates u to UW bits.
// u is registered and valid one clock after the tick. The document runs six
// such controllers in parallel, each generating the PWM for a motor driver;
// the fixed-point form, gains as inputs and the clamps are this design's.
module pid #(
  parameter int unsigned DW    = 16,    // setpoint / feedback width
  parameter int unsigned GW    = 16,    // gain width (unsigned)
  parameter int unsigned UW    = 14,    // output width (signed)
  parameter int unsigned SHIFT = 8,
  parameter int          IMAX  = 1 << 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  logic                 enable,
  input  logic signed [DW-1:0] setpoint,
  input  logic signed [DW-1:0] feedback,
  input  logic [GW-1:0]        kp,
  input  logic [GW-1:0]        ki,
  input  logic [GW-1:0]        kd,
  output logic signed [UW-1:0] u,
  output logic                 u_valid
);

  localparam int unsigned IW = 32;
  localparam int unsigned SW = 56;

  logic signed [DW:0]   e, e_prev;
  logic signed [IW-1:0] integ, integ_next;
  logic signed [SW-1:0] sum, shifted;
  localparam logic signed [SW-1:0] UMAX = SW'((1 << (UW - 1)) - 1);
  localparam logic signed [SW-1:0] UMIN = -SW'(1 << (UW - 1));

  always_comb begin
    e          = (DW+1)'(setpoint) - (DW+1)'(feedback);
    integ_next = integ + IW'(e);
    if (integ_next > IW'(IMAX))  integ_next = IW'(IMAX);
    if (integ_next < -IW'(IMAX)) integ_next = -IW'(IMAX);
    sum = SW'($signed({1'b0, kp})) * SW'(e)
        + SW'($signed({1'b0, ki})) * SW'(integ_next)
        + SW'($signed({1'b0, kd})) * SW'(e - e_prev);
    shifted = sum >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev  <= '0;
      integ   <= '0;
      u       <= '0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= 1'b0;
      if (!enable) begin
        e_prev <= '0;
        integ  <= '0;
        u      <= '0;
      end else if (tick) begin
        e_prev  <= e;
        integ   <= integ_next;
        u       <= (shifted > UMAX) ? UW'(UMAX) : (shifted < UMIN) ? UW'(UMIN) : UW'(shifted);
        u_valid <= 1'b1;
      end
    end
  end

endmodule
