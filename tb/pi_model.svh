// pi_model.svh: floating-point reference of the per-unit PI controller
// (values in LSB of a Q2.13 word), shared by the controller testbenches.
// integ = clamp(integ + ki e, lo, hi); y = clamp(kp e + integ, lo, hi).
class pi_model;
  real kp, ki, lo, hi, integ, y, y_raw;
  function new(real kp_, real ki_, real lo_pu, real hi_pu);
    kp = kp_; ki = ki_; lo = lo_pu * 8192.0; hi = hi_pu * 8192.0; integ = 0.0; y = 0.0;
  endfunction
  function void step(real e);
    integ = integ + ki * e;
    if (integ > hi) integ = hi;
    if (integ < lo) integ = lo;
    y_raw = kp * e + integ;
    y = y_raw;
    if (y > hi) y = hi;
    if (y < lo) y = lo;
  endfunction
  // 1: clearly at a limit, 0: clearly inside, -1: too close to tell
  function int at_limit();
    if (y_raw >= hi + 2.0 || y_raw <= lo - 2.0) return 1;
    if (y_raw <= hi - 2.0 && y_raw >= lo + 2.0) return 0;
    return -1;
  endfunction
endclass
