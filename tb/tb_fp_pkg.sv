// Testbench helpers: conversion between real and IEEE 754 single-precision
// bit patterns, written from the format definition through the 64-bit double
// pattern, so that expected values do not depend on the design's own
// converters.  to_fp32 truncates toward zero and flushes values outside the
// normal single-precision range; the testbenches use it only for values that
// are exactly representable, or compare with a tolerance.
package tb_fp_pkg;

  function automatic real from_fp32(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_fp32(real r);
    logic [63:0] d;
    int          e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 11'd0 || e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // Relative closeness with an absolute floor.
  function automatic bit close(real got, real want, real rel, real abs_tol);
    real diff, mag;
    diff = got - want;
    if (diff < 0.0) diff = -diff;
    mag = (want < 0.0) ? -want : want;
    return diff <= rel * mag + abs_tol;
  endfunction

endpackage
