// tb_pi_controller: self-checking test of the PI controller.
// Random errors, long runs of one sign (to reach the limits and test the
// anti-windup) and a sign reversal are applied; output and limit flag are
// compared with a floating-point PI model (3 LSB), 'valid' one clock after
// 'en'. The limits must be reached in both directions, and after a long
// saturation a reversed error must bring the output off the limit at once.
module tb_pi_controller;
  import foc_pkg::*;
  `include "pi_model.svh"

  localparam real KP = 2.0, KI = 0.05, HI = 1.5, LO = -1.5;

  int checks = 0, failures = 0, hi_hits = 0, lo_hits = 0;
  logic clk = 0, rst_n = 0, en = 0;
  pu_t  ref_in, fb, y;
  logic sat_flag, valid;
  pi_model m;

  pi_controller #(.KP(KP), .KI(KI), .OUT_MAX(HI), .OUT_MIN(LO)) dut (
    .clk, .rst_n, .en, .ref_in, .fb, .y, .sat_flag, .valid);

  always #5 clk = ~clk;

  task automatic step(input int r, input int f);
    int lim;
    @(negedge clk);
    ref_in = pu_t'(r); fb = pu_t'(f);
    en = 1;
    m.step(real'(r) - real'(f));
    @(negedge clk);
    en = 0;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid"); end
    checks++;
    if (real'(y) - m.y > 3.0 || m.y - real'(y) > 3.0) begin
      failures++;
      $display("FAIL y=%0d model=%0.1f", y, m.y);
    end
    lim = m.at_limit();
    if (lim >= 0) begin
      checks++;
      if (sat_flag != (lim == 1)) begin failures++; $display("FAIL sat flag"); end
    end
    if (sat_flag && y > 0) hi_hits++;
    if (sat_flag && y < 0) lo_hits++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(KP, KI, LO, HI);
    ref_in = '0; fb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (200) step($signed($urandom_range(0, 4000)) - 2000, $signed($urandom_range(0, 4000)) - 2000);
    repeat (300) step(8192, 0);            // drive into the upper limit
    step(0, 1000);                         // reversal: must leave the limit now
    checks++;
    if (y >= pu_t'(to_pu(HI))) begin failures++; $display("FAIL windup: still at limit"); end
    repeat (300) step(-8192, 4000);        // lower limit
    repeat (300) step($signed($urandom_range(0, 16000)) - 8000, $signed($urandom_range(0, 16000)) - 8000);
    checks++;
    if (hi_hits == 0 || lo_hits == 0) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
