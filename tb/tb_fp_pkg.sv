// tb_fp_pkg: conversions between FP32 bit patterns and real numbers for the
// testbenches, written without the design's arithmetic so that the reference
// values are independent of it.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0) return 32'd0;
    return {d[63], e[7:0], d[51:29]};
  endfunction

  // true when got is within rel relative error (or abs_tol absolute) of want
  function automatic bit close(input real got, input real want, input real rel, input real abs_tol);
    real diff, mag;
    diff = got - want;
    if (diff < 0.0) diff = -diff;
    mag = want < 0.0 ? -want : want;
    return (diff <= abs_tol) || (diff <= rel * mag);
  endfunction
endpackage
