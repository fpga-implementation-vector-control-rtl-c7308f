// pht_direct: direct phase transformation PHT[A].
//
// Converts three phase quantities (ga, gb, gc) into the two stator-frame
// space-phasor components (gd, gq) and the zero-sequence component g0:
//   g0 = (ga + gb + gc) / 3
//   gd = ga - g0
//   gq = (gb - gc) / sqrt(3)
// which is the amplitude-invariant (k = 2/3) Park/Clarke transformation of the
// original design. With ZERO_SEQ = 0 the simplified form is built (g0 taken as
// zero, gd = ga): one subtractor and one constant multiplier.
//
// Interface: Q2.13 per-unit words (see foc_pkg). Purely combinational; the
// outputs follow the inputs in the same cycle. The 1/3 and 1/sqrt(3)
// constants carry 17 fraction bits; results are rounded to nearest and
// saturated (a rounding choice of this design).
module pht_direct
  import foc_pkg::*;
#(
  parameter bit ZERO_SEQ = 1'b1
) (
  input  abc_t g_abc,
  output dq_t  g_dq,
  output pu_t  g0
);

  localparam logic signed [63:0] C_THIRD  = 64'(coef(1.0 / 3.0));
  localparam logic signed [63:0] C_ISQRT3 = 64'(coef(0.5773502691896258));

  logic signed [63:0] sum3, diff_bc, g0_w;

  always_comb begin
    sum3    = 64'(g_abc.a) + 64'(g_abc.b) + 64'(g_abc.c);
    diff_bc = 64'(g_abc.b) - 64'(g_abc.c);
    g0_w    = ZERO_SEQ ? rshift_round(sum3 * C_THIRD, KF) : 64'sd0;
    g0      = sat(g0_w);
    g_dq.d  = sat(64'(g_abc.a) - g0_w);
    g_dq.q  = sat(rshift_round(diff_bc * C_ISQRT3, KF));
  end

endmodule
