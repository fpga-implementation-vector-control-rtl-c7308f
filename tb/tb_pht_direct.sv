// tb_pht_direct: self-checking test of the direct phase transformation.
// Random three-phase inputs (and a few corner values) go into the full form
// and the simplified (no zero-sequence) form; gd, gq and g0 are compared
// with the transformation evaluated in floating point, to 2 LSB.
module tb_pht_direct;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  abc_t g_abc;
  dq_t  dq_full, dq_simple;
  pu_t  g0_full, g0_simple;

  pht_direct #(.ZERO_SEQ(1'b1)) dut_full   (.g_abc, .g_dq(dq_full),   .g0(g0_full));
  pht_direct #(.ZERO_SEQ(1'b0)) dut_simple (.g_abc, .g_dq(dq_simple), .g0(g0_simple));

  function automatic real lsb(input pu_t x); return real'(x); endfunction

  task automatic expect_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.2f expected %0.2f", what, got, exp);
    end
  endtask

  task automatic apply(input int a, input int b, input int c);
    real ra, rb, rc, r0;
    g_abc.a = pu_t'(a); g_abc.b = pu_t'(b); g_abc.c = pu_t'(c);
    #1;
    ra = a; rb = b; rc = c;
    r0 = (ra + rb + rc) / 3.0;
    expect_near("g0",  lsb(g0_full),   r0, 1.0);
    expect_near("gd",  lsb(dq_full.d), ra - r0, 2.0);
    expect_near("gq",  lsb(dq_full.q), (rb - rc) / $sqrt(3.0), 1.0);
    expect_near("g0s", lsb(g0_simple), 0.0, 0.0);
    expect_near("gds", lsb(dq_simple.d), ra, 0.0);
    expect_near("gqs", lsb(dq_simple.q), (rb - rc) / $sqrt(3.0), 1.0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th;
    // balanced set: gd = ga, gq = amplitude*sin, g0 = 0
    for (int k = 0; k < 36; k++) begin
      th = 6.283185307 * k / 36.0;
      apply($rtoi(8192.0 * $cos(th)), $rtoi(8192.0 * $cos(th - 2.094395102)),
            $rtoi(8192.0 * $cos(th + 2.094395102)));
    end
    apply(0, 0, 0);
    apply(16383, 16383, 16383);
    apply(-16384, 16383, -16384);
    repeat (500) apply($signed($urandom_range(0, 32767)) - 16384,
                       $signed($urandom_range(0, 32767)) - 16384,
                       $signed($urandom_range(0, 32767)) - 16384);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
