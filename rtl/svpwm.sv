// Space-vector PWM for a three-phase bridge (six MOSFET gates).
//
// The voltage vector (v_alpha, v_beta), signed Q1.15 fractions of the largest
// phase amplitude, is turned into three phase references by the inverse
// Clarke transform (va = a, vb = -a/2 + sqrt3/2 b, vc = -a/2 - sqrt3/2 b).
// Adding the common-mode offset -(max + min)/2 to all three gives the same
// switching times as classic sector-based space-vector modulation and lets
// the vector reach 2/sqrt3 of the sinusoidal limit. Each reference sets the
// on-time of a phase against a centre-aligned triangle carrier of HALF clocks
// up and HALF down (20 kHz with HALF = 5000 at 200 MHz, the document's
// modulation rate); the new vector is taken at the carrier's zero. High and
// low gates of a phase are complementary with DEAD clocks where both are off.
// The document gives SVM at 20 kHz driving six MOSFETs; the min-max form,
// the scaling, the dead time and the carrier are this design's choices.
module svpwm #(
  parameter int unsigned HALF = 5000,   // clocks per carrier half period
  parameter int unsigned DEAD = 100     // dead time in clocks (0.5 us)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic signed [15:0] v_alpha,
  input  logic signed [15:0] v_beta,
  output logic [2:0]         gate_hi,
  output logic [2:0]         gate_lo,
  output logic               period_start,
  output logic [15:0]        duty [3]     // high-side on-time per half period
);

  localparam int unsigned CW = $clog2(HALF + 1);
  localparam logic signed [17:0] SQRT3_2 = 18'sd28378;  // sqrt(3)/2 in Q15

  logic signed [17:0] va, vb, vc, vmax, vmin, voff;
  logic signed [17:0] vx [3];
  logic signed [35:0] prod;
  logic [15:0]        d_new [3];
  logic [CW-1:0]      cnt;
  logic               down;

  always_comb begin
    prod = SQRT3_2 * 18'(v_beta);
    va   = 18'(v_alpha);
    vb   = -(18'(v_alpha) >>> 1) + 18'(prod >>> 15);
    vc   = -(18'(v_alpha) >>> 1) - 18'(prod >>> 15);
    vmax = (va > vb) ? ((va > vc) ? va : vc) : ((vb > vc) ? vb : vc);
    vmin = (va < vb) ? ((va < vc) ? va : vc) : ((vb < vc) ? vb : vc);
    voff = -((vmax + vmin) >>> 1);
    vx[0] = va + voff;
    vx[1] = vb + voff;
    vx[2] = vc + voff;
    // On-time = HALF/2 + v * HALF/2: a phase reference of +-1.0 (Q15)
    // spans the whole half period.
    for (int p = 0; p < 3; p++) begin
      logic signed [35:0] t;
      t = 36'(signed'(HALF / 2)) + ((36'(vx[p]) * 36'(signed'(HALF))) >>> 16);
      if (t < 0)                 d_new[p] = '0;
      else if (t > 36'(HALF))    d_new[p] = 16'(HALF);
      else                       d_new[p] = 16'(t);
    end
  end

  assign period_start = (cnt == '0) && !down;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      down    <= 1'b0;
      gate_hi <= '0;
      gate_lo <= '0;
      for (int p = 0; p < 3; p++) duty[p] <= '0;
    end else begin
      // triangle carrier 0 .. HALF .. 0
      if (!down) begin
        if (cnt == CW'(HALF - 1)) down <= 1'b1;
        cnt <= cnt + 1'b1;
      end else begin
        if (cnt == CW'(1)) down <= 1'b0;
        cnt <= cnt - 1'b1;
      end
      if (period_start)
        for (int p = 0; p < 3; p++) duty[p] <= enable ? d_new[p] : 16'(HALF / 2);
      // A phase is high while the carrier is below half its on-time window,
      // centred on the carrier peak: high when cnt >= HALF - duty.
      for (int p = 0; p < 3; p++) begin
        gate_hi[p] <= enable && (32'(cnt) >= 32'(HALF) - 32'(duty[p]) + 32'(DEAD / 2)) && duty[p] != 0;
        gate_lo[p] <= enable && (32'(cnt) + 32'(DEAD / 2) < 32'(HALF) - 32'(duty[p]));
      end
    end
  end

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
                                       (gate_hi & gate_lo) == 3'b000)
    else $error("svpwm: both gates of a phase on");

endmodule
