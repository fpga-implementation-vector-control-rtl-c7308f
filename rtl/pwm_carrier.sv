// pwm_carrier: switching clock of the VSI modulators.
//
// A triangular up/down counter 0..HALF..0 gives the carrier of the
// space-vector modulator, scaled to -1..+1 pu, and a one-cycle 'sync' pulse
// at each turning point for the synchronised hysteresis controllers and the
// reconfiguration multiplexer. One carrier period is 2*HALF clocks; with
// HALF = 1024 and a 36 MHz clock that is 17.6 kHz (a choice of this design).
// HALF must divide 16384 so that the carrier step is a whole number of LSBs.
module pwm_carrier
  import foc_pkg::*;
#(
  parameter int HALF = 1024
) (
  input  logic clk,
  input  logic rst_n,
  output pu_t  carrier,
  output logic sync
);

  localparam int STEP = 16384 / HALF;

  logic [$clog2(HALF+1)-1:0] cnt;
  logic                      down;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      down <= 1'b0;
    end else if (!down) begin
      if (32'(cnt) == HALF - 1) down <= 1'b1;
      cnt <= cnt + 1'b1;
    end else begin
      if (cnt == 1) down <= 1'b0;
      cnt <= cnt - 1'b1;
    end
  end

  assign carrier = pu_t'(32'(cnt) * STEP - 8192);
  assign sync    = (cnt == 0) || (32'(cnt) == HALF);

endmodule
