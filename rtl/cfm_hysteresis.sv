// cfm_hysteresis: current-feedback modulation of the VSI.
//
// Three "bang-bang" current controllers, one per phase, each with a dead band
// of +-HYST around the reference. A phase's upper switch is turned on when
// the current error (reference minus measured) exceeds +HYST and off when it
// falls below -HYST; inside the band the switch keeps its state. The
// decisions are taken only on 'sync' pulses of a fixed switching clock, so a
// switch can change at most once per sync interval and the switching
// frequency stays bounded and nearly constant. Hysteresis control with
// synchronised on-off controllers follows the original; the band width is
// this design's example value.
//
// Interface: Q2.13 per-unit words. sw[0]/[1]/[2] = upper switch of phase
// a/b/c, registered, updated in the cycle after a sync pulse. Reset: all
// upper switches off.
module cfm_hysteresis
  import foc_pkg::*;
#(
  parameter real HYST = 0.02
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,
  input  abc_t       i_ref,
  input  abc_t       i_meas,
  output logic [2:0] sw
);

  localparam logic signed [17:0] H = 18'(to_pu(HYST));

  logic signed [17:0] err [3];

  always_comb begin
    err[0] = 18'(i_ref.a) - 18'(i_meas.a);
    err[1] = 18'(i_ref.b) - 18'(i_meas.b);
    err[2] = 18'(i_ref.c) - 18'(i_meas.c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw <= '0;
    end else if (sync) begin
      for (int k = 0; k < 3; k++) begin
        if (err[k] > H)       sw[k] <= 1'b1;
        else if (err[k] < -H) sw[k] <= 1'b0;
      end
    end
  end

endmodule
