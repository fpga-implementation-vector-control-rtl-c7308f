// tb_pht_reverse: self-checking test of the reverse phase transformation.
// Random d, q and zero-sequence inputs are compared with the inverse
// transformation evaluated in floating point (1 LSB), and a round trip
// through pht_direct must give the inputs back (2 LSB).
module tb_pht_reverse;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  dq_t  g_dq, back_dq;
  pu_t  g0, back0;
  abc_t g_abc;

  pht_reverse dut (.g_dq, .g0, .g_abc);
  pht_direct  inv (.g_abc, .g_dq(back_dq), .g0(back0));

  task automatic expect_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.2f expected %0.2f", what, got, exp);
    end
  endtask

  task automatic apply(input int d, input int q, input int z);
    real rd, rq, rz;
    g_dq.d = pu_t'(d); g_dq.q = pu_t'(q); g0 = pu_t'(z);
    #1;
    rd = d; rq = q; rz = z;
    expect_near("ga", real'(g_abc.a), rd + rz, 1.0);
    expect_near("gb", real'(g_abc.b), -rd / 2.0 + rq * $sqrt(3.0) / 2.0 + rz, 1.0);
    expect_near("gc", real'(g_abc.c), -rd / 2.0 - rq * $sqrt(3.0) / 2.0 + rz, 1.0);
    expect_near("rt_d", real'(back_dq.d), rd, 2.0);
    expect_near("rt_q", real'(back_dq.q), rq, 2.0);
    expect_near("rt_0", real'(back0), rz, 2.0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(8192, 0, 0);
    apply(0, 8192, 0);
    apply(-8192, -8192, 1000);
    repeat (500) apply($signed($urandom_range(0, 16383)) - 8192,
                       $signed($urandom_range(0, 16383)) - 8192,
                       $signed($urandom_range(0, 4095)) - 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
