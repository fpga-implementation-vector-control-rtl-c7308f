// pi_controller: per-unit PI controller with output limit and anti-windup.
//
// Used as the flux controller and as the speed controller of the vector
// control loop (and, with other gains, inside the DC-link current
// controller). On each 'en' strobe:
//   e     = ref - fb
//   integ = clamp(integ + KI * e, OUT_MIN, OUT_MAX)
//   y     = clamp(KP * e + integ, OUT_MIN, OUT_MAX)
// KI already contains the sample period. Clamping the integrator to the
// output range keeps it from winding up while the output is limited. The
// original only names these controllers; the PI form, the limits and the
// anti-windup are this design's choice.
//
// Interface: Q2.13 per-unit words; gains and limits are real parameters.
// y, sat (y is at a limit) and a one-cycle 'valid' appear in the cycle after
// 'en'. The integrator has 29 fraction bits.
module pi_controller
  import foc_pkg::*;
#(
  parameter real KP      = 2.0,
  parameter real KI      = 0.05,
  parameter real OUT_MAX = 1.5,
  parameter real OUT_MIN = -1.5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pu_t  ref_in,
  input  pu_t  fb,
  output pu_t  y,
  output logic sat_flag,
  output logic valid
);

  localparam int AF = 29;
  localparam logic signed [63:0] C_KP = 64'(coef(KP));
  localparam logic signed [63:0] C_KI = 64'(coef(KI));
  localparam logic signed [63:0] YMAX = 64'(to_pu(OUT_MAX));
  localparam logic signed [63:0] YMIN = 64'(to_pu(OUT_MIN));
  localparam logic signed [63:0] IMAX = YMAX <<< (AF - FRAC);
  localparam logic signed [63:0] IMIN = YMIN <<< (AF - FRAC);

  logic signed [31:0] integ;
  logic signed [63:0] e, i_nxt, y_nxt;

  always_comb begin
    e     = 64'(ref_in) - 64'(fb);
    i_nxt = 64'(integ) + rshift_round(e * C_KI, FRAC + KF - AF);
    if (i_nxt > IMAX)      i_nxt = IMAX;
    else if (i_nxt < IMIN) i_nxt = IMIN;
    y_nxt = rshift_round(e * C_KP, KF) + rshift_round(i_nxt, AF - FRAC);
    if (y_nxt > YMAX)      y_nxt = YMAX;
    else if (y_nxt < YMIN) y_nxt = YMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ    <= '0;
      y        <= '0;
      sat_flag <= 1'b0;
      valid    <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        integ    <= 32'(i_nxt);
        y        <= pu_t'(y_nxt);
        sat_flag <= (y_nxt == YMAX) || (y_nxt == YMIN);
      end
    end
  end

endmodule
