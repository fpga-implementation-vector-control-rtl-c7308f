// rotor_flux_comp: rotor (orientation) flux compensation (PsirCo).
//
// Turns the stator flux into the rotor flux, the field the control is
// oriented to, by removing the leakage flux and scaling:
//   psi_r = (Lr / Lm) (psi_s - sigma Ls i_s)
// applied to the d and q components alike. That the stator flux is
// compensated into the orientation flux follows the original; the relation
// used is the standard one and the default motor constants are examples.
//
// Interface: Q2.13 per-unit words. One register stage: inputs taken on an
// in_valid cycle appear on psi_r in the next cycle with out_valid.
module rotor_flux_comp
  import foc_pkg::*;
#(
  parameter real KR       = 1.0333333333333333,  // Lr / Lm
  parameter real SIGMA_LS = 0.197                // sigma * Ls, pu
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  dq_t  psi_s,
  input  dq_t  i_s,
  output dq_t  psi_r,
  output logic out_valid
);

  localparam logic signed [63:0] C_KR = 64'(coef(KR));
  localparam logic signed [63:0] C_SL = 64'(coef(SIGMA_LS));

  function automatic pu_t comp(input pu_t psi, input pu_t i);
    logic signed [63:0] t;
    t = (64'(psi) <<< KF) - 64'(i) * C_SL;   // FRAC+KF fraction bits
    return sat(rshift_round(t * C_KR, 2 * KF));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psi_r     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        psi_r.d <= comp(psi_s.d, i_s.d);
        psi_r.q <= comp(psi_s.q, i_s.q);
      end
    end
  end

endmodule
