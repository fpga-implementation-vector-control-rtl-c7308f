// coord_transform: coordinate transformation (field frame to stator frame).
//
// Rotates a space phasor given in the field-oriented frame (x along the
// rotor flux, y in quadrature) into the stator frame with the cosine and sine
// of the field angle supplied by the vector analyser:
//   gd = gx cos - gy sin
//   gq = gx sin + gy cos
// Both products of each line are summed at full precision and rounded once.
//
// Interface: Q2.13 per-unit words, sin/cos in the same format (1.0 = 8192).
// Purely combinational.
module coord_transform
  import foc_pkg::*;
(
  input  dq_t g_xy,     // .d = x (field) component, .q = y (torque) component
  input  pu_t cos_a,
  input  pu_t sin_a,
  output dq_t g_dq
);

  logic signed [63:0] pd, pq;

  always_comb begin
    pd     = 64'(g_xy.d) * 64'(cos_a) - 64'(g_xy.q) * 64'(sin_a);
    pq     = 64'(g_xy.d) * 64'(sin_a) + 64'(g_xy.q) * 64'(cos_a);
    g_dq.d = sat(rshift_round(pd, FRAC));
    g_dq.q = sat(rshift_round(pq, FRAC));
  end

endmodule
