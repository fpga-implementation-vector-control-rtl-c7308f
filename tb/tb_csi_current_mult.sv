// tb_csi_current_mult: self-checking test of the CSI current constant
// multiplier: idc_ref = pi/(2 sqrt 3) * |i_act|, to 1 LSB, never negative.
module tb_csi_current_mult;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  pu_t i_act, idc_ref;
  real k_exp;

  csi_current_mult dut (.i_act, .idc_ref);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exp;
    k_exp = 3.14159265358979 / (2.0 * $sqrt(3.0));
    for (int k = 0; k < 400; k++) begin
      i_act = pu_t'($signed($urandom_range(0, 32767)) - 16384);
      if (k == 0) i_act = '0;
      if (k == 1) i_act = pu_t'(16'sd8192);
      if (k == 2) i_act = pu_t'(-16'sd8192);
      #1;
      exp = k_exp * ((i_act < 0) ? -real'(i_act) : real'(i_act));
      checks++;
      if (real'(idc_ref) - exp > 1.0 || exp - real'(idc_ref) > 1.0 || idc_ref < 0) begin
        failures++;
        $display("FAIL i=%0d idc=%0d exp=%0.2f", i_act, idc_ref, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
