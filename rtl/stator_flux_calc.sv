// stator_flux_calc: stator flux computation (PsisC).
//
// Integrates the stator voltage equation in the stator frame, per unit:
//   d(psi_s)/dt = omega_b (u_s - Rs i_s)
// with forward Euler once per sample: psi += KT (u - Rs i), where
// KT = omega_b * Ts. The flux is held in 32-bit accumulators with 29 fraction
// bits, so the small per-step increments are not lost, and is rounded to a
// Q2.13 word at the output. Integrating the voltage equation follows the
// original; the Euler step, the accumulator precision and the example motor
// values are this design's. There is no drift correction.
//
// Interface: Q2.13 per-unit words. On an in_valid cycle the inputs are taken
// and psi_dq holds the new flux from the next cycle, marked by a one-cycle
// out_valid. The accumulators saturate instead of wrapping.
module stator_flux_calc
  import foc_pkg::*;
#(
  parameter real RS = 0.03,               // stator resistance, pu
  parameter real KT = 0.0037699111843077  // omega_b * Ts = 2*pi*50 Hz * 12 us
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  dq_t  u_dq,
  input  dq_t  i_dq,
  output dq_t  psi_dq,
  output logic out_valid
);

  localparam int AF = 29;                       // accumulator fraction bits
  localparam int KTF = 30;                      // fraction bits of KT
  localparam logic signed [63:0] C_RS = 64'(coef(RS));
  localparam logic signed [63:0] C_KT = 64'($rtoi(KT * real'(64'd1 << KTF) + 0.5));
  localparam logic signed [63:0] ACC_MAX = 64'sh7FFF_FFFF;
  localparam logic signed [63:0] ACC_MIN = -64'sh8000_0000;

  logic signed [31:0] acc_d, acc_q;

  // New accumulator value: acc + KT * (u - Rs i), the error kept in KF+FRAC bits
  function automatic logic signed [31:0] step(input logic signed [31:0] acc,
                                               input pu_t u, input pu_t i);
    logic signed [63:0] e, inc, nxt;
    e   = (64'(u) <<< KF) - 64'(i) * C_RS;               // FRAC+KF fraction bits
    inc = rshift_round(e * C_KT, FRAC + KF + KTF - AF);  // AF fraction bits
    nxt = 64'(acc) + inc;
    if (nxt > ACC_MAX)      nxt = ACC_MAX;
    else if (nxt < ACC_MIN) nxt = ACC_MIN;
    return 32'(nxt);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_d     <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc_d <= step(acc_d, u_dq.d, i_dq.d);
        acc_q <= step(acc_q, u_dq.q, i_dq.q);
      end
    end
  end

  always_comb begin
    psi_dq.d = sat(rshift_round(64'(acc_d), AF - FRAC));
    psi_dq.q = sat(rshift_round(64'(acc_q), AF - FRAC));
  end

endmodule
