// Second-order IIR low-pass filter (Butterworth by default).
//
// Direct form I: y = b0 x + b1 x1 + b2 x2 - a1 y1 - a2 y2, coefficients in
// signed fixed point with FRAC fraction bits, an output state with eight
// extra fraction bits, one sample per `in_valid`,
// result registered one clock later with `out_valid`, saturated to DW bits.
// The document oversamples the ADC at 320 kHz and passes it through a
// Butterworth filter; the order and the cut-off are not given. The defaults
// are a 2nd-order Butterworth with a 5 kHz cut-off at 320 kHz sampling
// (bilinear transform, K = tan(pi fc/fs), b0 = K^2/(1 + sqrt2 K + K^2),
// b1 = 2 b0, b2 = b0, a1 = 2(K^2 - 1)/(...), a2 = (1 - sqrt2 K + K^2)/(...)),
// scaled by 2^24 and rounded so that the DC gain is exactly one.
module biquad #(
  parameter int unsigned DW   = 16,
  parameter int unsigned CW   = 27,
  parameter int unsigned FRAC = 24,
  parameter logic signed [CW-1:0] B0 = 27'sd37775,
  parameter logic signed [CW-1:0] B1 = 27'sd75551,
  parameter logic signed [CW-1:0] B2 = 27'sd37775,
  parameter logic signed [CW-1:0] A1 = -27'sd31228458,
  parameter logic signed [CW-1:0] A2 = 27'sd14602343
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic                 out_valid,
  output logic signed [DW-1:0] y
);

  localparam int unsigned YF   = 8;              // fraction bits kept in the output state
  localparam int unsigned YW   = DW + 8 + YF;   // output state: guard bits and fraction
  localparam int unsigned PWID = YW + CW + 4;   // product and sum width

  logic signed [DW-1:0]   x1, x2;
  logic signed [YW-1:0]   y1, y2, ynew, yrnd;
  logic signed [PWID-1:0] acc;

  // acc carries FRAC + YF fraction bits; the state keeps YF of them so that
  // rounding does not build up through the feedback path.
  always_comb begin
    acc = ((PWID'(B0) * PWID'(x) + PWID'(B1) * PWID'(x1) + PWID'(B2) * PWID'(x2)) <<< YF)
        - PWID'(A1) * PWID'(y1) - PWID'(A2) * PWID'(y2);
    ynew = YW'((acc + (PWID'(1) <<< (FRAC - 1))) >>> FRAC);
    yrnd = (ynew + (YW'(1) <<< (YF - 1))) >>> YF;
  end

  localparam logic signed [YW-1:0] YMAX = YW'((1 << (DW - 1)) - 1);
  localparam logic signed [YW-1:0] YMIN = -YW'(1 << (DW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
      y <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= x;  x2 <= x1;
        y1 <= ynew; y2 <= y1;
        y  <= (yrnd > YMAX) ? DW'(YMAX) : (yrnd < YMIN) ? DW'(YMIN) : DW'(yrnd);
      end
    end
  end

endmodule
