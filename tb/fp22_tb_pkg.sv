// fp22_tb_pkg: testbench helpers for 22-bit floating point numbers.
//
// Conversions between real numbers and the fp22 format (16-bit two's
// complement fraction, 6-bit two's complement exponent, value = frac/2^15 *
// 2^exp), written independently of the RTL so that testbenches can compute
// expected results with ordinary real arithmetic.
package fp22_tb_pkg;
  import fp22_pkg::*;

  function automatic real fp2r(input fp22_t a);
    return real'(a.frac) / 32768.0 * (2.0 ** real'(a.exp));
  endfunction

  // Round to the nearest fp22 number (normalized), true zero for 0.
  function automatic fp22_t r2fp(input real v);
    fp22_t r;
    int    e;
    real   m;
    longint f;
    if (v == 0.0) return FP_ZERO;
    e = 0;
    m = v;
    while (m >= 1.0 || m < -1.0) begin m = m / 2.0; e++; end
    while (m < 0.5 && m >= -0.5) begin m = m * 2.0; e--; end
    f = longint'($floor(m * 32768.0 + 0.5));
    if (f == 32768) begin f = 16384; e++; end
    if (f == -16384) begin f = -32768; e--; end
    r.frac = 16'(f);
    r.exp  = 6'(e);
    return r;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Is the number normalized (or true zero)?
  function automatic bit is_norm(input fp22_t a);
    if (a.frac == 16'sd0) return (a.exp == -6'sd32);
    return a.frac[15] != a.frac[14];
  endfunction

endpackage
