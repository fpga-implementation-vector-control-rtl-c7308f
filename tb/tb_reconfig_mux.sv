// tb_reconfig_mux: self-checking test of the reconfiguration multiplexer.
// The selection is changed at random times; the active mode may change only
// at a sync pulse, and the switch outputs must always come from the active
// source. Switches in both directions are counted.
module tb_reconfig_mux;
  int checks = 0, failures = 0, n_to_svm = 0, n_to_cfm = 0;
  logic       clk = 0, rst_n = 0, sync = 0, sel = 0;
  logic [2:0] sw_cfm, sw_svm, sw;
  logic       mode, exp_mode;

  reconfig_mux dut (.clk, .rst_n, .sync, .sel, .sw_cfm, .sw_svm, .sw, .mode);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw_cfm = '0; sw_svm = '0; exp_mode = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      if ($urandom_range(0, 40) == 0) sel = ~sel;
      sync   = ($urandom_range(0, 9) == 0);
      sw_cfm = 3'($urandom);
      sw_svm = 3'($urandom);
      if (sync && sel != exp_mode) begin
        if (sel) n_to_svm++; else n_to_cfm++;
        exp_mode = sel;
      end
      @(negedge clk);
      checks++;
      if (mode !== exp_mode) begin failures++; $display("FAIL mode t=%0d", t); end
      sw_cfm = 3'($urandom);
      sw_svm = 3'($urandom);
      #1;
      checks++;
      if (sw !== (exp_mode ? sw_svm : sw_cfm)) begin failures++; $display("FAIL sw t=%0d", t); end
    end
    checks++;
    if (n_to_svm == 0 || n_to_cfm == 0) begin failures++; $display("FAIL no mode change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
