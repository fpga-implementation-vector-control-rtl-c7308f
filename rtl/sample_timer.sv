// sample_timer: control sampling period.
//
// Pulses 'tick' for one cycle every PERIOD clocks. The pulse ends one
// sample period of the controller and starts the next A/D conversion. With
// the 36 MHz clock of this design the default 432 clocks give the 12 us
// sampling period set by the serially-read A/D converter.
module sample_timer #(
  parameter int PERIOD = 432
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  logic [$clog2(PERIOD)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (32'(cnt) == PERIOD - 2);
      cnt  <= (32'(cnt) == PERIOD - 1) ? '0 : cnt + 1'b1;
    end
  end

endmodule
