// reconfig_mux: reconfiguration multiplexer of the VSI modulation.
//
// Lets the controller change the modulation procedure of the VSI at run
// time: sel = 0 selects the current-feedback (hysteresis) modulator, sel = 1
// the space-vector modulator. A new selection is taken over only at a sync
// pulse of the switching clock, so a change never cuts a switching interval
// short. That a multiplexer reconfigures the control structure follows the
// original; what it selects and the sync-aligned change are this design's
// choices.
//
// Interface: sw follows the active source combinationally; 'mode' shows the
// active selection (registered, reset to current-feedback modulation).
module reconfig_mux (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,
  input  logic       sel,
  input  logic [2:0] sw_cfm,
  input  logic [2:0] sw_svm,
  output logic [2:0] sw,
  output logic       mode
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mode <= 1'b0;
    else if (sync) mode <= sel;
  end

  assign sw = mode ? sw_svm : sw_cfm;

endmodule
