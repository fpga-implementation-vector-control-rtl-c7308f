// tb_stator_flux_calc: self-checking test of the stator flux integrator.
// A rotating stator voltage with a resistive current is integrated for
// several hundred steps; the flux is compared with a floating-point
// forward-Euler model (2 LSB). Then a constant voltage drives the integrator
// into saturation, and out_valid must follow in_valid by one clock.
module tb_stator_flux_calc;
  import foc_pkg::*;

  localparam real RS = 0.03;
  localparam real KT = 0.0037699111843077;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  dq_t  u_dq, i_dq, psi_dq;
  logic out_valid;

  stator_flux_calc #(.RS(RS), .KT(KT)) dut (.clk, .rst_n, .in_valid, .u_dq, .i_dq, .psi_dq, .out_valid);

  always #5 clk = ~clk;

  task automatic expect_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.2f expected %0.2f", what, got, exp);
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
    real pd, pq, th;
    u_dq = '0; i_dq = '0;
    pd = 0; pq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 800; k++) begin
      th = KT * k;                                    // 1 pu frequency
      u_dq.d = pu_t'($rtoi(8192.0 * $cos(th)));
      u_dq.q = pu_t'($rtoi(8192.0 * $sin(th)));
      i_dq.d = pu_t'($rtoi(4096.0 * $cos(th - 0.5)));
      i_dq.q = pu_t'($rtoi(4096.0 * $sin(th - 0.5)));
      pd += KT * (real'(u_dq.d) - RS * real'(i_dq.d));
      pq += KT * (real'(u_dq.q) - RS * real'(i_dq.q));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid missing"); end
      expect_near("psi_d", real'(psi_dq.d), pd, 2.0);
      expect_near("psi_q", real'(psi_dq.q), pq, 2.0);
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid too long"); end
      if (k % 100 == 0) begin   // gaps without in_valid must hold the flux
        repeat (5) @(negedge clk);
        expect_near("hold_d", real'(psi_dq.d), pd, 2.0);
      end
    end
    // saturation: +3 pu for long enough to pass 4 pu
    u_dq.d = pu_t'(16'sd24576); i_dq = '0;
    in_valid = 1;
    repeat (2000) @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    expect_near("sat", real'(psi_dq.d), 32767.0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
