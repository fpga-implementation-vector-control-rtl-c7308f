// foc_pkg: number format and shared types of the vector-control datapath.
//
// Every signal quantity (voltages, currents, fluxes, speed, sin/cos) is a
// per-unit value in a 16-bit two's-complement word with 13 fraction bits
// (Q2.13: range -4.0 .. +3.99988, one LSB = 1.22e-4 pu). The 16-bit width
// follows the bus widths of the original library; the split into integer and
// fraction bits is this design's choice. Products are rounded to nearest and
// saturated to the 16-bit range. Constants are given to modules as real
// parameters and turned into fixed-point integers at elaboration time.
package foc_pkg;

  localparam int W    = 16;   // word width
  localparam int FRAC = 13;   // fraction bits of a signal word
  localparam int KF   = 17;   // fraction bits of a constant coefficient

  typedef logic signed [W-1:0] pu_t;

  typedef struct packed {
    pu_t a;
    pu_t b;
    pu_t c;
  } abc_t;

  typedef struct packed {
    pu_t d;
    pu_t q;
  } dq_t;

  localparam pu_t PU_MAX = pu_t'(16'sh7FFF);
  localparam pu_t PU_MIN = pu_t'(16'sh8000);
  localparam pu_t PU_ONE = pu_t'(16'sd8192);

  // Saturate a wide signed value to one signal word.
  function automatic pu_t sat(input logic signed [63:0] x);
    if (x > 64'sd32767)       return PU_MAX;
    else if (x < -64'sd32768) return PU_MIN;
    else                      return pu_t'(x);
  endfunction

  // Arithmetic right shift with round-to-nearest (ties toward +inf).
  function automatic logic signed [63:0] rshift_round(input logic signed [63:0] x, input int sh);
    if (sh <= 0) return x;
    return (x + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

  // Signal times signal, both Q2.13, result Q2.13 rounded and saturated.
  function automatic pu_t qmul(input pu_t a, input pu_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return sat(rshift_round(p, FRAC));
  endfunction

  // Real coefficient to a constant with KF fraction bits.
  function automatic int coef(input real r);
    return $rtoi(r * real'(1 << KF) + ((r >= 0.0) ? 0.5 : -0.5));
  endfunction

  // Real value to a signal word.
  function automatic int to_pu(input real r);
    return $rtoi(r * real'(1 << FRAC) + ((r >= 0.0) ? 0.5 : -0.5));
  endfunction

endpackage
