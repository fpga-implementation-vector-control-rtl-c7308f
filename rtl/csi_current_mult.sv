// csi_current_mult: CSI DC-link current reference (constant multiplier).
//
// In the tandem converter the large current-source inverter carries the
// active power. Its DC-link current reference is formed here from the
// active (torque-producing) stator-current reference isy:
//   idc_ref = K_CSI * |isy|
// K_CSI = pi / (2 sqrt 3) converts a fundamental phase-current amplitude into
// the DC current of a 120-degree block-current inverter. That the original
// block is a constant multiplier is given; its input and constant are this
// design's choice. The result is never negative, since a CSI DC link
// conducts in one direction only.
//
// Interface: Q2.13 per-unit words. Purely combinational.
module csi_current_mult
  import foc_pkg::*;
#(
  parameter real K_CSI = 0.9068996821171089
) (
  input  pu_t i_act,
  output pu_t idc_ref
);

  localparam logic signed [63:0] C_K = 64'(coef(K_CSI));

  logic signed [63:0] mag;

  always_comb begin
    mag     = (i_act < 0) ? -64'(i_act) : 64'(i_act);
    idc_ref = sat(rshift_round(mag * C_K, KF));
  end

endmodule
