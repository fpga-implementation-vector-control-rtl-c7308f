// tb_flux_speed_ctrl: self-checking test of the flux and speed loops.
// Flux and speed errors are applied together; isx and isy are compared with
// two floating-point PI models (3 LSB). The field current must stay within
// 0..1 pu and the torque current reach both of its limits.
module tb_flux_speed_ctrl;
  import foc_pkg::*;
  `include "pi_model.svh"

  int checks = 0, failures = 0, spd_sat = 0, flux_zero = 0;
  logic       clk = 0, rst_n = 0, en = 0;
  pu_t        psi_ref, psi_mag, omega_ref, omega;
  dq_t        i_xy_ref;
  logic [1:0] sat_flags;
  logic       valid;
  pi_model    mf, ms;

  flux_speed_ctrl dut (.clk, .rst_n, .en, .psi_ref, .psi_mag, .omega_ref, .omega,
                       .i_xy_ref, .sat_flags, .valid);

  always #5 clk = ~clk;

  task automatic check_near(input string what, input real got, input real exp);
    checks++;
    if (got - exp > 3.0 || exp - got > 3.0) begin
      failures++;
      $display("FAIL %s got %0.1f expected %0.1f", what, got, exp);
    end
  endtask

  task automatic step(input int pr, input int pm, input int wr, input int w);
    @(negedge clk);
    psi_ref = pu_t'(pr); psi_mag = pu_t'(pm); omega_ref = pu_t'(wr); omega = pu_t'(w);
    en = 1;
    mf.step(real'(pr) - real'(pm));
    ms.step(real'(wr) - real'(w));
    @(negedge clk);
    en = 0;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid"); end
    check_near("isx", real'(i_xy_ref.d), mf.y);
    check_near("isy", real'(i_xy_ref.q), ms.y);
    checks++;
    if (i_xy_ref.d < 0 || i_xy_ref.d > 8192) begin failures++; $display("FAIL isx range"); end
    if (sat_flags[1]) spd_sat++;
    if (i_xy_ref.d == 0) flux_zero++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mf = new(4.0, 0.2, 0.0, 1.0);
    ms = new(8.0, 0.02, -1.5, 1.5);
    {psi_ref, psi_mag, omega_ref, omega} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) step(8192, 80 * k, 4096, 40 * k);   // flux build-up, acceleration
    for (int k = 0; k < 100; k++) step(8192, 9000, -4096, 4096);      // over-flux, reversal
    repeat (200) step($urandom_range(0, 9000), $urandom_range(0, 9000),
                      $signed($urandom_range(0, 16000)) - 8000, $signed($urandom_range(0, 16000)) - 8000);
    checks++;
    if (spd_sat == 0 || flux_zero == 0) begin failures++; $display("FAIL limits never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
