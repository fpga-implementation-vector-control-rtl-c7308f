// tandem_foc_top: rotor-field-oriented vector control of a tandem-converter
// fed induction machine, with current-feedback modulation of the VSI.
//
// The tandem converter drives the motor from two inverters in parallel: a
// large current-source inverter (CSI) for the active power and a small
// PWM voltage-source inverter (VSI) for the reactive power and current
// quality. This controller closes the vector-control loop through the VSI
// and sets the CSI DC-link current.
//
// Signal flow, once per sample period (SAMPLE_CYCLES clocks, 12 us):
//   vs_ident       stator voltage rebuilt from Udc and the VSI switch states
//   pht_direct x2  stator voltage and current to the stator d-q frame
//   stator_flux_calc  integrates u - Rs i to the stator flux
//   rotor_flux_comp   stator flux to rotor (orientation) flux
//   vector_analyser   rotor-flux magnitude and sin/cos of its angle
//   flux_speed_ctrl   flux and speed PI loops -> current reference isx, isy
//   coord_transform   field frame -> stator frame, using sin/cos
//   pht_reverse       -> three phase current references
//   cfm_hysteresis    synchronised bang-bang current control -> VSI gates
//   csi_current_mult + dclink_current_ctrl: CSI DC-link current loop
// Alongside, svm_modulator turns an external stator-voltage reference into
// VSI gates, and reconfig_mux selects which modulator drives the VSI.
// pwm_carrier supplies the switching clock (sync) and the SVM carrier.
//
// Timing: counting from the clock cycle in which the sample strobe
// (adc_convst) is high, the averaged stator voltage is valid 1 cycle later,
// the stator flux 2, the rotor flux 3, the flux magnitude and angle 35, the
// current reference 36, and the DC-link controller output with ctrl_valid
// 37 cycles later (about 1 us of the 12 us period). The hysteresis
// controllers act on the new reference at the following
// sync pulses. Phase currents, speed and DC-link current are taken from
// the A/D converter and held by it between samples; the top registers the
// currents and the speed at the strobe. The pulse pattern of the CSI is not
// generated here: the stator-current reference and the DC-link references
// are outputs for it.
//
// Everything is in Q2.13 per-unit (foc_pkg). Clock 36 MHz assumed (the
// original implementation ran below 38 MHz). Reset is asynchronous, active
// low.
module tandem_foc_top
  import foc_pkg::*;
#(
  parameter int SAMPLE_CYCLES = 432,   // 12 us at 36 MHz
  parameter int CARRIER_HALF  = 1024,  // 17.6 kHz switching clock at 36 MHz
  // machine and converter constants (example values, per unit)
  parameter real RS           = 0.03,                 // stator resistance
  parameter real KT           = 0.0037699111843077,   // omega_b * Ts
  parameter real KR           = 1.0333333333333333,   // Lr / Lm
  parameter real SIGMA_LS     = 0.197,                // sigma * Ls
  parameter real U_ON         = 0.01,                 // device forward drop
  parameter real HYST         = 0.02                  // current dead band
) (
  input  logic       clk,
  input  logic       rst_n,
  // measurements (from the A/D converter, held between samples)
  input  abc_t       i_abc_meas,
  input  pu_t        udc_meas,
  input  pu_t        idc_meas,
  input  pu_t        omega_meas,
  // references and configuration
  input  pu_t        omega_ref,
  input  pu_t        psi_ref,
  input  logic       mod_sel,      // 0: current-feedback modulation, 1: SVM
  input  dq_t        u_dq_svm,     // voltage reference for SVM, pu of Udc/2
  // outputs
  output logic       adc_convst,
  output logic [2:0] vsi_gates,
  output logic       mod_active,
  output pu_t        ur_ref,
  output pu_t        idc_ref,
  output dq_t        i_dq_ref,
  output abc_t       i_abc_ref,
  output pu_t        psi_r_mag,
  output pu_t        cos_l,
  output pu_t        sin_l,
  output logic [2:0] sat_flags,    // [0] flux, [1] speed, [2] DC-link controller
  output logic       ctrl_valid
);

  logic tick, sync;
  pu_t  carrier;

  sample_timer #(.PERIOD(SAMPLE_CYCLES)) u_timer (.clk, .rst_n, .tick);
  pwm_carrier  #(.HALF(CARRIER_HALF))    u_carrier (.clk, .rst_n, .carrier, .sync);

  assign adc_convst = tick;

  // samples of the period that ends at the strobe
  abc_t i_abc_s;
  pu_t  omega_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_abc_s <= '0;
      omega_s <= '0;
    end else if (tick) begin
      i_abc_s <= i_abc_meas;
      omega_s <= omega_meas;
    end
  end

  // ---------------- flux estimation ----------------
  abc_t u_abc;
  logic u_valid;
  dq_t  u_dq, i_dq;
  pu_t  u0_unused, i0_unused;

  vs_ident #(.SAMPLE_CYCLES(SAMPLE_CYCLES), .U_ON(U_ON)) u_vsid (
    .clk, .rst_n, .udc(udc_meas), .sw(vsi_gates), .i_abc(i_abc_meas),
    .sample(tick), .u_abc, .valid(u_valid));

  pht_direct u_pht_u (.g_abc(u_abc),   .g_dq(u_dq), .g0(u0_unused));
  pht_direct u_pht_i (.g_abc(i_abc_s), .g_dq(i_dq), .g0(i0_unused));

  dq_t  psi_s, psi_r;
  logic psis_valid, psir_valid;

  stator_flux_calc #(.RS(RS), .KT(KT)) u_psis (
    .clk, .rst_n, .in_valid(u_valid), .u_dq, .i_dq,
    .psi_dq(psi_s), .out_valid(psis_valid));

  rotor_flux_comp #(.KR(KR), .SIGMA_LS(SIGMA_LS)) u_psir (
    .clk, .rst_n, .in_valid(psis_valid), .psi_s, .i_s(i_dq),
    .psi_r, .out_valid(psir_valid));

  logic va_busy, va_done;

  vector_analyser u_va (
    .clk, .rst_n, .start(psir_valid), .g_dq(psi_r),
    .mag(psi_r_mag), .sin_a(sin_l), .cos_a(cos_l), .busy(va_busy), .done(va_done));

  // a new rotor flux must never arrive while the analyser is still busy
  a_va_free: assert property (@(posedge clk) disable iff (!rst_n) psir_valid |-> !va_busy)
    else $error("vector analyser started while busy");

  // ---------------- control loops ----------------
  dq_t  i_xy_ref;
  logic fs_valid;

  flux_speed_ctrl u_fsc (
    .clk, .rst_n, .en(va_done), .psi_ref, .psi_mag(psi_r_mag),
    .omega_ref, .omega(omega_s), .i_xy_ref, .sat_flags(sat_flags[1:0]), .valid(fs_valid));

  coord_transform u_ct (.g_xy(i_xy_ref), .cos_a(cos_l), .sin_a(sin_l), .g_dq(i_dq_ref));

  pht_reverse u_phtb_i (.g_dq(i_dq_ref), .g0('0), .g_abc(i_abc_ref));

  // ---------------- VSI modulation ----------------
  logic [2:0] sw_cfm, sw_svm;
  abc_t       u_abc_svm;

  cfm_hysteresis #(.HYST(HYST)) u_cfm (.clk, .rst_n, .sync, .i_ref(i_abc_ref), .i_meas(i_abc_meas), .sw(sw_cfm));

  pht_reverse   u_phtb_u (.g_dq(u_dq_svm), .g0('0), .g_abc(u_abc_svm));
  svm_modulator u_svm    (.u_abc(u_abc_svm), .carrier, .sw(sw_svm));

  reconfig_mux u_mux (.clk, .rst_n, .sync, .sel(mod_sel), .sw_cfm, .sw_svm,
                      .sw(vsi_gates), .mode(mod_active));

  // ---------------- CSI DC-link current ----------------
  csi_current_mult u_csik (.i_act(i_xy_ref.q), .idc_ref);

  dclink_current_ctrl u_dcc (
    .clk, .rst_n, .en(fs_valid), .idc_ref, .idc_meas,
    .ur_ref, .sat_flag(sat_flags[2]), .valid(ctrl_valid));

endmodule
