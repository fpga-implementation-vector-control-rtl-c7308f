// tb_rotor_flux_comp: self-checking test of the rotor flux compensation,
// psi_r = KR (psi_s - SIGMA_LS i_s), against floating point (2 LSB), with
// one clock of latency and the output held between updates.
module tb_rotor_flux_comp;
  import foc_pkg::*;

  localparam real KR = 1.0333333333333333;
  localparam real SL = 0.197;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  dq_t  psi_s, i_s, psi_r;
  logic out_valid;

  rotor_flux_comp #(.KR(KR), .SIGMA_LS(SL)) dut (.clk, .rst_n, .in_valid, .psi_s, .i_s, .psi_r, .out_valid);

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
    real ed, eq;
    psi_s = '0; i_s = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      psi_s.d = pu_t'($signed($urandom_range(0, 20000)) - 10000);
      psi_s.q = pu_t'($signed($urandom_range(0, 20000)) - 10000);
      i_s.d   = pu_t'($signed($urandom_range(0, 30000)) - 15000);
      i_s.q   = pu_t'($signed($urandom_range(0, 30000)) - 15000);
      ed = KR * (real'(psi_s.d) - SL * real'(i_s.d));
      eq = KR * (real'(psi_s.q) - SL * real'(i_s.q));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid"); end
      expect_near("psi_rd", real'(psi_r.d), ed, 2.0);
      expect_near("psi_rq", real'(psi_r.q), eq, 2.0);
      psi_s = '0;                       // must not disturb the held output
      @(negedge clk);
      expect_near("hold", real'(psi_r.d), ed, 2.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
