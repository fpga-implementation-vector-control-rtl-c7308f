// flux_speed_ctrl: flux and speed control loops.
//
// The outer loops of rotor-field-oriented control. The flux controller
// compares the rotor-flux reference with the estimated rotor-flux magnitude
// and gives the field (x) component of the stator-current reference; the
// speed controller compares the speed reference with the measured speed and
// gives the torque (y) component. Both are PI controllers (pi_controller)
// updated by the same strobe, which the top raises when the vector analyser
// has a new flux magnitude. The field current is limited to 0..1 pu (the
// flux is never driven negative), the torque current to +-1.5 pu. That
// these two loops produce the current reference follows the original; gains
// and limits are this design's example values.
//
// Interface: Q2.13 per-unit words. i_xy_ref.d = isx (field), .q = isy
// (torque). Results and 'valid' appear the cycle after 'en'.
module flux_speed_ctrl
  import foc_pkg::*;
#(
  parameter real FLUX_KP  = 4.0,
  parameter real FLUX_KI  = 0.2,
  parameter real FLUX_MAX = 1.0,
  parameter real SPD_KP   = 8.0,
  parameter real SPD_KI   = 0.02,
  parameter real SPD_MAX  = 1.5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  pu_t        psi_ref,
  input  pu_t        psi_mag,
  input  pu_t        omega_ref,
  input  pu_t        omega,
  output dq_t        i_xy_ref,
  output logic [1:0] sat_flags,   // [0] flux at limit, [1] speed at limit
  output logic       valid
);

  logic v_flux, v_spd;

  pi_controller #(.KP(FLUX_KP), .KI(FLUX_KI), .OUT_MAX(FLUX_MAX), .OUT_MIN(0.0)) u_flux (
    .clk, .rst_n, .en, .ref_in(psi_ref), .fb(psi_mag),
    .y(i_xy_ref.d), .sat_flag(sat_flags[0]), .valid(v_flux));

  pi_controller #(.KP(SPD_KP), .KI(SPD_KI), .OUT_MAX(SPD_MAX), .OUT_MIN(-SPD_MAX)) u_speed (
    .clk, .rst_n, .en, .ref_in(omega_ref), .fb(omega),
    .y(i_xy_ref.q), .sat_flag(sat_flags[1]), .valid(v_spd));

  assign valid = v_flux & v_spd;

endmodule
