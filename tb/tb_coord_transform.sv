// tb_coord_transform: self-checking test of the field-to-stator rotation.
// Random field-frame vectors are rotated by random angles; the outputs are
// compared with the rotation computed in floating point from the same
// quantised sin/cos words (1 LSB), and the vector length must be kept.
module tb_coord_transform;
  import foc_pkg::*;

  int checks = 0, failures = 0;
  dq_t g_xy, g_dq;
  pu_t cos_a, sin_a;

  coord_transform dut (.g_xy, .cos_a, .sin_a, .g_dq);

  task automatic expect_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0.2f expected %0.2f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, c, s, x, y, len_in, len_out;
    for (int k = 0; k < 600; k++) begin
      th = 6.283185307 * real'($urandom_range(0, 9999)) / 10000.0;
      if (k < 4) th = 1.570796327 * k;
      cos_a = pu_t'($rtoi($floor(8192.0 * $cos(th) + 0.5)));
      sin_a = pu_t'($rtoi($floor(8192.0 * $sin(th) + 0.5)));
      g_xy.d = pu_t'($signed($urandom_range(0, 16383)) - 8192);
      g_xy.q = pu_t'($signed($urandom_range(0, 16383)) - 8192);
      #1;
      c = real'(cos_a) / 8192.0; s = real'(sin_a) / 8192.0;
      x = real'(g_xy.d); y = real'(g_xy.q);
      expect_near("d", real'(g_dq.d), x * c - y * s, 1.0);
      expect_near("q", real'(g_dq.q), x * s + y * c, 1.0);
      len_in  = $sqrt(x * x + y * y);
      len_out = $sqrt(real'(g_dq.d) ** 2 + real'(g_dq.q) ** 2);
      expect_near("len", len_out, len_in, 3.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
