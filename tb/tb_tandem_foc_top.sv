// tb_tandem_foc_top: end-to-end test of the vector controller at its
// default sizes (12 us sample period of 432 clocks, 17.6 kHz switching
// clock).
//
// The VSI feeds a simple machine model: per phase a resistance RS and the
// full stator inductance LS (rotor circuit at rest, so psi_s = LS i and the
// rotor flux is Lm i). The testbench integrates it every clock from the
// switch commands and feeds the currents back as the A/D samples. Phases:
//   1. magnetisation: psi_ref = 1 pu, speed reference 0;
//   2. speed step with the speed held at zero: the speed loop saturates;
//   3. SVM mode with a fixed voltage reference, then back to current control.
// Checks:
//   * the rotor-flux magnitude at every ctrl_valid equals a floating-point
//     model of the estimator chain (leg voltages from the same switch states,
//     period average, Clarke, Euler integration, compensation) to 6 LSB;
//   * ctrl_valid follows adc_convst by a fixed 37 clocks, once per period;
//   * sin^2 + cos^2 = 1, the stator-current reference has the length of the
//     field-frame reference, the phase references sum to zero, and the CSI
//     current reference is pi/(2 sqrt 3) |isy|;
//   * the flux reaches its reference under current-feedback modulation;
//   * in SVM mode the line-voltage duty over a carrier period matches the
//     voltage reference.
// Each mechanism (sampling, vector analysis, flux/speed/DC-link limits,
// hysteresis switching and holding, both mode switches) is counted and must
// occur at least once.
module tb_tandem_foc_top;
  import foc_pkg::*;

  localparam real RS   = 0.03;
  localparam real LS   = 3.1;
  localparam real LM   = 3.0;
  localparam real KCLK = 314.159265 / 36.0e6;   // omega_b per clock, pu time
  localparam real KT   = 0.0037699111843077;    // same as the estimator
  localparam real KR   = 1.0333333333333333;
  localparam real SL   = 0.197;
  localparam real UON  = 0.01 * 8192.0;
  localparam int  N    = 432;

  int checks = 0, failures = 0;
  int n_samples = 0, n_va = 0, n_valid = 0, n_flux_lim = 0, n_spd_lim = 0, n_dc_lim = 0;
  int n_sw = 0, n_hold = 0, n_to_svm = 0, n_to_cfm = 0, n_csi = 0;

  logic       clk = 0, rst_n = 0;
  abc_t       i_abc_meas;
  pu_t        udc_meas, idc_meas, omega_meas, omega_ref, psi_ref;
  logic       mod_sel;
  dq_t        u_dq_svm;
  logic       adc_convst;
  logic [2:0] vsi_gates;
  logic       mod_active;
  pu_t        ur_ref, idc_ref;
  dq_t        i_dq_ref;
  abc_t       i_abc_ref;
  pu_t        psi_r_mag, cos_l, sin_l;
  logic [2:0] sat_flags;
  logic       ctrl_valid;

  tandem_foc_top dut (.*);

  always #5 clk = ~clk;

  // plant state and estimator model
  real ia = 0, ib = 0, ic = 0;
  real sum_a = 0, sum_b = 0, sum_c = 0;
  real m_psd = 0, m_psq = 0, m_mag = 0, m_mag_prev = 0;
  int  cyc = 0, t_convst = -1;
  logic [2:0] last_gates = '0;

  task automatic expect_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0.3f expected %0.3f", what, cyc, got, exp);
    end
  endtask

  function automatic real leg(input logic s, input pu_t i);
    real v;
    v = s ? real'(udc_meas) : 0.0;
    if (i > 0) v -= UON; else if (i < 0) v += UON;
    return v;
  endfunction

  // one clock of plant, model and bookkeeping, at the falling edge
  always @(negedge clk) if (rst_n) begin
    real ua, ub, uc, ud, uq, id, iq, prd, prq, vdc;
    cyc++;
    // plant: phase voltages from the switch states, R-L per phase
    vdc = real'(udc_meas) / 8192.0;
    ua = vdc * (2.0 * vsi_gates[0] - vsi_gates[1] - vsi_gates[2]) / 3.0;
    ub = vdc * (2.0 * vsi_gates[1] - vsi_gates[2] - vsi_gates[0]) / 3.0;
    uc = vdc * (2.0 * vsi_gates[2] - vsi_gates[0] - vsi_gates[1]) / 3.0;
    ia += KCLK * (ua - RS * ia) / LS;
    ib += KCLK * (ub - RS * ib) / LS;
    ic += KCLK * (uc - RS * ic) / LS;
    i_abc_meas.a = pu_t'($rtoi(ia * 8192.0));
    i_abc_meas.b = pu_t'($rtoi(ib * 8192.0));
    i_abc_meas.c = pu_t'($rtoi(ic * 8192.0));
    // estimator model: what the next clock edge will accumulate
    sum_a += leg(vsi_gates[0], i_abc_meas.a);
    sum_b += leg(vsi_gates[1], i_abc_meas.b);
    sum_c += leg(vsi_gates[2], i_abc_meas.c);
    if (adc_convst) begin
      n_samples++;
      t_convst = cyc;
      ua = (2.0 * sum_a - sum_b - sum_c) / (3.0 * N);
      ub = (2.0 * sum_b - sum_c - sum_a) / (3.0 * N);
      uc = (2.0 * sum_c - sum_a - sum_b) / (3.0 * N);
      ud = ua - (ua + ub + uc) / 3.0;
      uq = (ub - uc) / $sqrt(3.0);
      id = real'(i_abc_meas.a) - real'(int'(i_abc_meas.a) + i_abc_meas.b + i_abc_meas.c) / 3.0;
      iq = real'(int'(i_abc_meas.b) - i_abc_meas.c) / $sqrt(3.0);
      m_psd += KT * (ud - RS * id);
      m_psq += KT * (uq - RS * iq);
      prd = KR * (m_psd - SL * id);
      prq = KR * (m_psq - SL * iq);
      m_mag_prev = m_mag;
      m_mag = $sqrt(prd * prd + prq * prq);
      sum_a = 0; sum_b = 0; sum_c = 0;
    end
    if (dut.va_done) n_va++;
    // switching activity of the hysteresis controllers
    if (!mod_active) begin
      if (vsi_gates != last_gates) n_sw++;
      else if (dut.sync) n_hold++;
    end
    last_gates = vsi_gates;
    if (ctrl_valid) begin
      real c2, len_xy, len_dq;
      n_valid++;
      checks++;
      if (cyc - t_convst != 37) begin
        failures++;
        $display("FAIL latency %0d", cyc - t_convst);
      end
      expect_near("psi_r_mag", real'(psi_r_mag), (m_mag > 32767.0) ? 32767.0 : m_mag, 6.0);
      if (psi_r_mag > 400) begin
        c2 = (real'(cos_l) ** 2 + real'(sin_l) ** 2) / (8192.0 * 8192.0);
        expect_near("sin2+cos2", c2, 1.0, 0.01);
      end
      len_xy = $sqrt(real'(dut.i_xy_ref.d) ** 2 + real'(dut.i_xy_ref.q) ** 2);
      len_dq = $sqrt(real'(i_dq_ref.d) ** 2 + real'(i_dq_ref.q) ** 2);
      expect_near("ref length", len_dq, len_xy * (real'(cos_l) ** 2 + real'(sin_l) ** 2) / (8192.0 * 8192.0), 3.0);
      expect_near("abc sum", real'(int'(i_abc_ref.a) + i_abc_ref.b + i_abc_ref.c), 0.0, 3.0);
      expect_near("csi ref", real'(idc_ref),
                  3.14159265 / (2.0 * $sqrt(3.0)) * ((dut.i_xy_ref.q < 0) ? -real'(dut.i_xy_ref.q) : real'(dut.i_xy_ref.q)), 1.0);
      if (idc_ref != 0) n_csi++;
      if (sat_flags[0]) n_flux_lim++;
      if (sat_flags[1]) n_spd_lim++;
      if (sat_flags[2]) n_dc_lim++;
    end
  end

  always @(posedge clk) if (rst_n && $past(mod_active) != mod_active) begin
    if (mod_active) n_to_svm++; else n_to_cfm++;
  end

  initial begin
    #80000000;   // 8 M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic periods(input int n);
    repeat (n * N) @(negedge clk);
  endtask

  initial begin
    int on_a, on_b;
    i_abc_meas = '0;
    udc_meas   = pu_t'(to_pu(1.0));
    idc_meas   = '0;
    omega_meas = '0;
    omega_ref  = '0;
    psi_ref    = pu_t'(to_pu(1.0));
    mod_sel    = 1'b0;
    u_dq_svm   = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. magnetisation
    periods(700);
    expect_near("flux reached", real'(psi_r_mag) / 8192.0, 1.0, 0.05);
    $display("flux after magnetisation: %0.4f pu", real'(psi_r_mag) / 8192.0);

    // 2. speed step, speed held at zero
    omega_ref = pu_t'(to_pu(0.2));
    periods(60);
    omega_ref = '0;
    periods(40);

    // 3. SVM with a fixed reference, then back
    mod_sel  = 1'b1;
    u_dq_svm.d = pu_t'(to_pu(0.5));
    u_dq_svm.q = '0;
    periods(10);
    on_a = 0; on_b = 0;
    repeat (2048) begin
      @(negedge clk);
      if (vsi_gates[0]) on_a++;
      if (vsi_gates[1]) on_b++;
    end
    // u_a - u_b = 0.75 (of Udc/2) -> duty difference 0.375
    expect_near("svm duty", real'(on_a - on_b) / 2048.0, 0.375, 0.01);
    mod_sel = 1'b0;
    periods(10);

    $display("samples %0d va %0d valid %0d flux-limit %0d speed-limit %0d dc-limit %0d",
             n_samples, n_va, n_valid, n_flux_lim, n_spd_lim, n_dc_lim);
    $display("switchings %0d holds %0d to-svm %0d to-cfm %0d csi-ref %0d",
             n_sw, n_hold, n_to_svm, n_to_cfm, n_csi);
    checks++;
    if (n_samples < 800 || n_va < n_samples - 1 || n_valid < n_samples - 1) begin
      failures++; $display("FAIL sample/analysis counts");
    end
    checks++;
    if (n_flux_lim == 0 || n_spd_lim == 0 || n_dc_lim == 0) begin
      failures++; $display("FAIL a controller limit never occurred");
    end
    checks++;
    if (n_sw == 0 || n_hold == 0 || n_to_svm == 0 || n_to_cfm == 0 || n_csi == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
