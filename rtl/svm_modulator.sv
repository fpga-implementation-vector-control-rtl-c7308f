// svm_modulator: space-vector modulation of the VSI.
//
// Open-loop voltage modulation, the alternative to current-feedback
// modulation selected by the reconfiguration multiplexer. It is built in the
// carrier-comparison form that is equivalent to symmetric space-vector
// modulation: the common-mode offset -(max + min)/2 of the three phase
// references is added to each, which centres the active vectors and shares
// the zero vectors equally, and each result is compared with a triangular
// carrier. The original names the block only; this realisation is this
// design's choice.
//
// Interface: Q2.13 words. u_abc are phase-voltage references normalised to
// Udc/2 (linear range up to 2/sqrt(3) = 1.1547 in amplitude); carrier runs
// between -1 and +1. sw[k] = 1 when the shifted reference is above the
// carrier. Purely combinational.
module svm_modulator
  import foc_pkg::*;
(
  input  abc_t       u_abc,
  input  pu_t        carrier,
  output logic [2:0] sw
);

  logic signed [17:0] u [3];
  logic signed [17:0] mx, mn, off, m [3];

  always_comb begin
    u[0] = 18'(u_abc.a);
    u[1] = 18'(u_abc.b);
    u[2] = 18'(u_abc.c);
    mx = u[0];
    mn = u[0];
    for (int k = 1; k < 3; k++) begin
      if (u[k] > mx) mx = u[k];
      if (u[k] < mn) mn = u[k];
    end
    off = -((mx + mn) >>> 1);
    for (int k = 0; k < 3; k++) begin
      m[k]  = u[k] + off;
      sw[k] = m[k] > 18'(carrier);
    end
  end

endmodule
