// vs_ident: stator voltage identification (V_sId).
//
// The modulated stator voltage is not measured; it is rebuilt from the
// measured DC-link voltage and the switch commands of the VSI. Each clock the
// three leg voltages are formed as
//   v_x = S_x * Udc - U_ON * sign(i_x)
// (U_ON is the forward drop of the conducting switch or diode, whose sign
// follows the phase current), and summed over the sample period. At the
// sample strobe the period averages of the phase voltages are output:
//   u_a = (2 v_a - v_b - v_c) / 3   (likewise b, c)
// i.e. each leg voltage minus the common-mode part. Using the switch states,
// the DC-link voltage and the device drops follows the original; averaging
// over the period (so that the flux integrator sees the mean voltage of each
// step) is this design's choice.
//
// Interface: Q2.13 per-unit words; sw[0]/sw[1]/sw[2] are the upper-switch
// commands of phases a/b/c. 'sample' is high for one cycle at the last cycle
// of each period of SAMPLE_CYCLES clocks; u_abc and 'valid' appear in the
// next cycle. The first output after reset averages a partial period.
module vs_ident
  import foc_pkg::*;
#(
  parameter int  SAMPLE_CYCLES = 432,
  parameter real U_ON          = 0.01
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pu_t        udc,
  input  logic [2:0] sw,
  input  abc_t       i_abc,
  input  logic       sample,
  output abc_t       u_abc,
  output logic       valid
);

  localparam int RSH = 30;
  localparam logic signed [63:0] RECIP3 =
    64'((64'sd1 <<< RSH) + 64'(3 * SAMPLE_CYCLES / 2)) / 64'(3 * SAMPLE_CYCLES);
  localparam logic signed [31:0] UON_Q = 32'(to_pu(U_ON));

  logic signed [31:0] v [3];
  logic signed [31:0] acc [3];
  logic signed [31:0] tot [3];
  pu_t                ph_i [3];

  assign ph_i[0] = i_abc.a;
  assign ph_i[1] = i_abc.b;
  assign ph_i[2] = i_abc.c;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      v[k] = sw[k] ? 32'(udc) : 32'sd0;
      if (ph_i[k] > 0)      v[k] = v[k] - UON_Q;
      else if (ph_i[k] < 0) v[k] = v[k] + UON_Q;
      tot[k] = acc[k] + v[k];
    end
  end

  function automatic pu_t phase_avg(input logic signed [31:0] x, y, z);
    logic signed [63:0] s;
    s = 64'sd2 * 64'(x) - 64'(y) - 64'(z);
    return sat(rshift_round(s * RECIP3, RSH));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) acc[k] <= '0;
      u_abc <= '0;
      valid <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) begin
        u_abc.a <= phase_avg(tot[0], tot[1], tot[2]);
        u_abc.b <= phase_avg(tot[1], tot[2], tot[0]);
        u_abc.c <= phase_avg(tot[2], tot[0], tot[1]);
        for (int k = 0; k < 3; k++) acc[k] <= '0;
      end else begin
        for (int k = 0; k < 3; k++) acc[k] <= tot[k];
      end
    end
  end

endmodule
