// tb_cfm_hysteresis: self-checking test of the synchronised hysteresis
// current controllers. Random references and currents are applied every
// clock while sync pulses come at a fixed interval. A per-phase model
// (on above +band, off below -band, else hold; decisions only at sync) is
// compared with the switch outputs every clock. Switching, holding inside the
// band and the absence of switching between syncs are all counted.
module tb_cfm_hysteresis;
  import foc_pkg::*;

  localparam int H = 164;            // 0.02 pu in LSB
  localparam int SYNC_EVERY = 8;

  int checks = 0, failures = 0, n_on = 0, n_off = 0, n_hold = 0;
  logic       clk = 0, rst_n = 0, sync = 0;
  abc_t       i_ref, i_meas;
  logic [2:0] sw, exp_sw, prev_sw;

  cfm_hysteresis #(.HYST(0.02)) dut (.clk, .rst_n, .sync, .i_ref, .i_meas, .sw);

  always #5 clk = ~clk;

  function automatic int err_of(input int k);
    case (k)
      0: return int'(i_ref.a) - int'(i_meas.a);
      1: return int'(i_ref.b) - int'(i_meas.b);
      default: return int'(i_ref.c) - int'(i_meas.c);
    endcase
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    i_ref = '0; i_meas = '0; exp_sw = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      i_ref.a = pu_t'($signed($urandom_range(0, 1000)) - 500);
      i_ref.b = pu_t'($signed($urandom_range(0, 1000)) - 500);
      i_ref.c = pu_t'($signed($urandom_range(0, 1000)) - 500);
      i_meas  = i_ref;
      i_meas.a = pu_t'(int'(i_ref.a) + $signed($urandom_range(0, 500)) - 250);
      i_meas.b = pu_t'(int'(i_ref.b) + $signed($urandom_range(0, 500)) - 250);
      i_meas.c = pu_t'(int'(i_ref.c) + $signed($urandom_range(0, 500)) - 250);
      sync = (t % SYNC_EVERY == 0);
      prev_sw = exp_sw;
      if (sync) begin
        for (int k = 0; k < 3; k++) begin
          e = err_of(k);
          if (e > H) exp_sw[k] = 1'b1;
          else if (e < -H) exp_sw[k] = 1'b0;
          else n_hold++;
          if (exp_sw[k] && !prev_sw[k]) n_on++;
          if (!exp_sw[k] && prev_sw[k]) n_off++;
        end
      end
      @(negedge clk);
      checks++;
      if (sw !== exp_sw) begin
        failures++;
        $display("FAIL t=%0d sw=%b expected %b", t, sw, exp_sw);
      end
    end
    checks++;
    if (n_on == 0 || n_off == 0 || n_hold == 0) begin failures++; $display("FAIL a case never happened"); end
    $display("turn-on %0d turn-off %0d hold %0d", n_on, n_off, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
