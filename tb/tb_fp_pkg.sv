// tb_fp_pkg: conversions between binary32 bit patterns and real numbers for
// the self-checking testbenches, plus a relative/absolute error check. The
// conversions are written out by hand so that they do not depend on the
// simulator's shortreal support.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    e = int'(f[30:23]) - 127;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] b;
    int          e;
    logic [24:0] m;
    b = $realtobits(r);
    if (b[62:52] == 11'd0) return 32'h0;
    e = int'(b[62:52]) - 1023 + 127;
    m = {2'b01, b[51:29]} + 25'(b[28]);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return {b[63], 31'd0};
    return {b[63], e[7:0], m[22:0]};
  endfunction

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // true when got is within tol of exp, measured against max(|exp|, scale)
  function automatic bit close(input real got, input real exp, input real tol, input real scale);
    real den;
    den = (rabs(exp) > scale) ? rabs(exp) : scale;
    return rabs(got - exp) <= tol * den;
  endfunction

endpackage
