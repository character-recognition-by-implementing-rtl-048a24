// tb_float_pkg: helpers for testbenches that check single-precision values.
// Conversions go through the simulator's double-precision reals, so the
// expected values are computed independently of the design's float_alu.
package tb_float_pkg;

  // single-precision bit pattern to real (subnormals read as zero)
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // real to single precision, truncating the mantissa (normal range only)
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    if (r == 0.0) return 32'd0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // true when a and b agree within a few units in the last place
  function automatic bit close(input real got, input real want);
    real tol;
    tol = fabs(want) * (2.0 ** -21) + 1.0e-30;
    return fabs(got - want) <= tol;
  endfunction

endpackage
