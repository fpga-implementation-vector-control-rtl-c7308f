// tb_dclink_current_ctrl: self-checking test of the CSI DC-link current
// controller. Current steps and random values (some negative readings, which
// count as zero) are applied; ur_ref is compared with a floating-point PI
// model (3 LSB) and must reach both rectifier limits.
module tb_dclink_current_ctrl;
  import foc_pkg::*;
  `include "pi_model.svh"

  int checks = 0, failures = 0, hi_hits = 0, lo_hits = 0;
  logic clk = 0, rst_n = 0, en = 0;
  pu_t  idc_ref, idc_meas, ur_ref;
  logic sat_flag, valid;
  pi_model m;

  dclink_current_ctrl dut (.clk, .rst_n, .en, .idc_ref, .idc_meas, .ur_ref, .sat_flag, .valid);

  always #5 clk = ~clk;

  task automatic step(input int r, input int f);
    real fb;
    @(negedge clk);
    idc_ref = pu_t'(r); idc_meas = pu_t'(f);
    en = 1;
    fb = (f < 0) ? 0.0 : real'(f);
    m.step(real'(r) - fb);
    @(negedge clk);
    en = 0;
    checks++;
    if (!valid || real'(ur_ref) - m.y > 3.0 || m.y - real'(ur_ref) > 3.0) begin
      failures++;
      $display("FAIL ur=%0d model=%0.1f", ur_ref, m.y);
    end
    if (sat_flag && ur_ref > 0) hi_hits++;
    if (sat_flag && ur_ref < 0) lo_hits++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(1.0, 0.1, -1.0, 1.0);
    idc_ref = '0; idc_meas = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (100) step(8192, -500);
    repeat (100) step(0, 12000);
    repeat (300) step($urandom_range(0, 9000), $signed($urandom_range(0, 10000)) - 1000);
    checks++;
    if (hi_hits == 0 || lo_hits == 0) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
