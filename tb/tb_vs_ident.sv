// tb_vs_ident: self-checking test of the stator voltage identification.
// Random switch states, DC-link voltage and current signs are applied for
// whole sample periods (shortened to 24 clocks); the testbench sums the leg
// voltages itself and checks the period-averaged phase voltages (1 LSB),
// that they sum to zero, and that 'valid' comes one clock after 'sample'.
module tb_vs_ident;
  import foc_pkg::*;

  localparam int  N    = 24;
  localparam real UON  = 0.01;

  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, sample = 0;
  pu_t        udc;
  logic [2:0] sw;
  abc_t       i_abc, u_abc;
  logic       valid;

  vs_ident #(.SAMPLE_CYCLES(N), .U_ON(UON)) dut (.clk, .rst_n, .udc, .sw, .i_abc, .sample, .u_abc, .valid);

  always #5 clk = ~clk;

  task automatic expect_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.2f expected %0.2f", what, got, exp);
    end
  endtask

  function automatic real leg(input logic s, input real vdc, input pu_t i);
    real v;
    v = s ? vdc : 0.0;
    if (i > 0) v -= UON * 8192.0;
    else if (i < 0) v += UON * 8192.0;
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sa, sb, sc, vdc;
    udc = '0; sw = '0; i_abc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      sa = 0; sb = 0; sc = 0;
      for (int k = 0; k < N; k++) begin
        udc = pu_t'($urandom_range(6000, 10000));
        sw  = 3'($urandom);
        i_abc.a = pu_t'($signed($urandom_range(0, 200)) - 100);
        i_abc.b = pu_t'($signed($urandom_range(0, 200)) - 100);
        i_abc.c = pu_t'($signed($urandom_range(0, 200)) - 100);
        if (p == 0) sw = 3'b100;                 // a fixed vector first
        sample = (k == N - 1);
        vdc = real'(udc);
        sa += leg(sw[0], vdc, i_abc.a);
        sb += leg(sw[1], vdc, i_abc.b);
        sc += leg(sw[2], vdc, i_abc.c);
        @(negedge clk);
        checks++;
        if (valid !== (k == N - 1)) begin failures++; $display("FAIL valid timing"); end
      end
      sample = 0;
      expect_near("ua", real'(u_abc.a), (2.0 * sa - sb - sc) / (3.0 * N), 1.0);
      expect_near("ub", real'(u_abc.b), (2.0 * sb - sc - sa) / (3.0 * N), 1.0);
      expect_near("uc", real'(u_abc.c), (2.0 * sc - sa - sb) / (3.0 * N), 1.0);
      expect_near("sum", real'(u_abc.a) + real'(u_abc.b) + real'(u_abc.c), 0.0, 2.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
