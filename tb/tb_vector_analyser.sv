// tb_vector_analyser: self-checking test of the vector analyser.
// Phasors on the axes, at 45 degrees, zero, near full scale and random ones
// are analysed; magnitude (2 LSB), sin and cos (3 LSB) are compared with
// floating-point values, and done must rise 31 clocks after the
// clock edge that takes start (32 edges counted inclusive). A start while busy must be ignored.
module tb_vector_analyser;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  dq_t  g_dq;
  pu_t  mag, sin_a, cos_a;
  logic busy, done;

  vector_analyser dut (.clk, .rst_n, .start, .g_dq, .mag, .sin_a, .cos_a, .busy, .done);

  always #5 clk = ~clk;

  task automatic expect_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.2f expected %0.2f (d=%0d q=%0d)", what, got, exp, g_dq.d, g_dq.q);
    end
  endtask

  task automatic analyse(input int d, input int q);
    int  lat;
    real m, em;
    @(negedge clk);
    g_dq.d = pu_t'(d); g_dq.q = pu_t'(q);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    // a second start while busy must be ignored
    g_dq.d = pu_t'(-d); g_dq.q = pu_t'(q / 2);
    start = 1;
    @(negedge clk);
    start = 0;
    lat++;
    while (!done) begin @(negedge clk); lat++; end
    g_dq.d = pu_t'(d); g_dq.q = pu_t'(q);
    checks++;
    if (lat != 32) begin failures++; $display("FAIL latency %0d", lat); end
    m  = $sqrt(real'(d) * real'(d) + real'(q) * real'(q));
    em = (m > 32767.0) ? 32767.0 : m;
    expect_near("mag", real'(mag), em, 2.0);
    if (m == 0.0) begin
      expect_near("cos0", real'(cos_a), 8192.0, 0.0);
      expect_near("sin0", real'(sin_a), 0.0, 0.0);
    end else begin
      // |g| is an integer number of LSBs, so the ratio carries 1/|g| of
      // relative error on top of the divider's own truncation
      expect_near("cos", real'(cos_a), 8192.0 * real'(d) / m, 3.0 + 8192.0 / m);
      expect_near("sin", real'(sin_a), 8192.0 * real'(q) / m, 3.0 + 8192.0 / m);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g_dq = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    analyse(8192, 0);
    analyse(0, 8192);
    analyse(-8192, 0);
    analyse(0, -8192);
    analyse(5793, 5793);
    analyse(0, 0);
    analyse(1, 0);
    analyse(-32768, -32768);
    analyse(32767, -32768);
    analyse(3, -4);
    repeat (300) analyse($signed($urandom_range(0, 65535)) - 32768,
                         $signed($urandom_range(0, 65535)) - 32768);
    repeat (100) analyse($signed($urandom_range(0, 400)) - 200,
                         $signed($urandom_range(0, 400)) - 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
