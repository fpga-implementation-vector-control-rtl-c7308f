// tb_svm_modulator: self-checking test of the space-vector modulator.
// For each voltage reference the carrier is swept over a full period and the
// on-time of each phase is counted. The average line-to-line voltages must
// equal the reference's (to 1 % of Udc/2), including over-modulation-free
// references up to 2/sqrt(3); the common-mode of the duty cycles must sit in
// the middle (min-max centring) and no phase may be stuck in a period.
module tb_svm_modulator;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  abc_t       u_abc;
  pu_t        carrier;
  logic [2:0] sw;

  svm_modulator dut (.u_abc, .carrier, .sw);

  task automatic expect_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.4f expected %0.4f", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real amp, th, ua, ub, uc, da, db, dc, dmax, dmin;
    int  on [3];
    for (int r = 0; r < 120; r++) begin
      amp = 1.15 * real'($urandom_range(0, 1000)) / 1000.0;
      th  = 6.283185307 * real'($urandom_range(0, 1000)) / 1000.0;
      ua = amp * $cos(th);
      ub = amp * $cos(th - 2.094395102);
      uc = amp * $cos(th + 2.094395102);
      u_abc.a = pu_t'($rtoi(ua * 8192.0));
      u_abc.b = pu_t'($rtoi(ub * 8192.0));
      u_abc.c = pu_t'($rtoi(uc * 8192.0));
      on = '{0, 0, 0};
      for (int c = -8192; c < 8192; c += 16) begin
        carrier = pu_t'(c);
        #1;
        for (int k = 0; k < 3; k++) if (sw[k]) on[k]++;
      end
      // duty d gives an average leg voltage (2d - 1) Udc/2
      da = real'(on[0]) / 1024.0; db = real'(on[1]) / 1024.0; dc = real'(on[2]) / 1024.0;
      expect_near("uab", 2.0 * (da - db), ua - ub, 0.01);
      expect_near("ubc", 2.0 * (db - dc), ub - uc, 0.01);
      dmax = da; dmin = da;
      if (db > dmax) dmax = db; if (dc > dmax) dmax = dc;
      if (db < dmin) dmin = db; if (dc < dmin) dmin = dc;
      expect_near("centre", (dmax + dmin) / 2.0, 0.5, 0.01);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
