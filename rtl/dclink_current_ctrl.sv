// dclink_current_ctrl: DC-link current controller of the CSI.
//
// Controls the DC-link current of the current-source inverter through the
// controlled rectifier that feeds it. A PI controller (pi_controller) acts
// on idc_ref - idc_meas and gives the rectifier's output-voltage reference
// ur_ref in -UR_MAX..UR_MAX (negative values put the rectifier into
// inversion to return energy). The measured current is first limited at zero,
// since a CSI DC link cannot carry negative current and a negative reading is
// sensor offset. The original names this controller only; its structure,
// gains and limits are this design's.
//
// Interface: Q2.13 per-unit words. Results and 'valid' the cycle after 'en'.
module dclink_current_ctrl
  import foc_pkg::*;
#(
  parameter real KP     = 1.0,
  parameter real KI     = 0.1,
  parameter real UR_MAX = 1.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pu_t  idc_ref,
  input  pu_t  idc_meas,
  output pu_t  ur_ref,
  output logic sat_flag,
  output logic valid
);

  pu_t idc_fb;

  assign idc_fb = (idc_meas < 0) ? '0 : idc_meas;

  pi_controller #(.KP(KP), .KI(KI), .OUT_MAX(UR_MAX), .OUT_MIN(-UR_MAX)) u_pi (
    .clk, .rst_n, .en, .ref_in(idc_ref), .fb(idc_fb),
    .y(ur_ref), .sat_flag, .valid);

endmodule
