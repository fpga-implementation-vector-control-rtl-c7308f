// pht_reverse: reverse phase transformation PHT[B].
//
// Converts stator-frame space-phasor components (gd, gq) and a zero-sequence
// component g0 back to three phase quantities, the inverse of pht_direct:
//   ga = gd + g0
//   gb = -gd/2 + (sqrt(3)/2) gq + g0
//   gc = -gd/2 - (sqrt(3)/2) gq + g0
// In the controller it turns the stator-current reference into the three
// references of the hysteresis current controllers. The equations are the
// standard inverse; the original gives only the block's purpose.
//
// Interface: Q2.13 per-unit words. Purely combinational. The sqrt(3)/2
// constant carries 17 fraction bits; results are rounded and saturated.
module pht_reverse
  import foc_pkg::*;
(
  input  dq_t  g_dq,
  input  pu_t  g0,
  output abc_t g_abc
);

  localparam logic signed [63:0] C_SQRT3_2 = 64'(coef(0.8660254037844386));

  logic signed [63:0] half_d, q_term;

  always_comb begin
    // -gd/2 exactly in KF fraction bits, q term rounded once at the end
    half_d    = -(64'(g_dq.d) <<< (KF - 1));
    q_term    = 64'(g_dq.q) * C_SQRT3_2;
    g_abc.a   = sat(64'(g_dq.d) + 64'(g0));
    g_abc.b   = sat(rshift_round(half_d + q_term, KF) + 64'(g0));
    g_abc.c   = sat(rshift_round(half_d - q_term, KF) + 64'(g0));
  end

endmodule
