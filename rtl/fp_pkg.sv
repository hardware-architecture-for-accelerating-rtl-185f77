// fp_pkg: IEEE-754 single-precision arithmetic used throughout the beamformer.
//
// Every data word of the core is a complex number of two binary32 values:
// the upper 32 bits hold the imaginary part, the lower 32 bits the real part
// (cplx_t). The functions below are combinational and synthesizable; the
// pipelined operator module fp_op wraps them with a configurable latency.
//
// Arithmetic rules (a design choice, the vendor operator cores are not
// described bit-exactly): round to nearest even, subnormal inputs and results
// are flushed to zero, an exponent of 255 is treated as infinity and passed
// through, NaN payloads are not preserved.
package fp_pkg;

  typedef logic [31:0] f32_t;

  typedef struct packed {
    f32_t im;
    f32_t re;
  } cplx_t;


  // Round a normalised 24-bit significand with guard and sticky bits and pack.
  function automatic f32_t fp_pack(input logic s, input int e, input logic [23:0] m,
                                   input logic g, input logic st);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m} + 25'((g & (st | m[0])) ? 1 : 0);
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er <= 0)        return {s, 31'd0};
    else if (er >= 255) return {s, 8'hFF, 23'd0};
    else                return {s, er[7:0], mr[22:0]};
  endfunction

  function automatic f32_t fp_add(input f32_t a, input f32_t b);
    logic        sa, sb;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic [7:0]  d;
    logic [53:0] sh;
    logic [26:0] xa, xb;
    logic [27:0] sum;
    int          e, lz;
    f32_t        t;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (b[30:23] == 8'h00) return (a[30:23] == 8'h00) ? 32'h0 : a;
    if (a[30:23] == 8'h00) return b;
    // order the operands by magnitude
    if (b[30:0] > a[30:0]) begin
      t = a; a = b; b = t;
    end
    sa = a[31]; sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    d  = ea - eb;
    if (d > 8'd30) d = 8'd30;
    sh = {mb, 30'd0} >> d;
    xa = {ma, 3'b000};
    xb = {sh[53:28], |sh[27:0]};
    e  = int'(ea);
    if (sa == sb) begin
      sum = {1'b0, xa} + {1'b0, xb};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 1;
      end
    end else begin
      sum = {1'b0, xa} - {1'b0, xb};
      if (sum == 28'd0) return 32'h0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - lz;
    end
    return fp_pack(sa, e, sum[26:3], sum[2], sum[1] | sum[0]);
  endfunction

  function automatic f32_t fp_neg(input f32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic f32_t fp_sub(input f32_t a, input f32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic f32_t fp_mul(input f32_t a, input f32_t b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    if (a[30:23] == 8'h00 || b[30:23] == 8'h00) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else       return fp_pack(s, e,     p[46:23], p[22], |p[21:0]);
  endfunction

  // Division by two: decrement of the exponent field.
  function automatic f32_t fp_div2(input f32_t a);
    if (a[30:23] == 8'hFF) return a;
    if (a[30:23] <= 8'h01) return {a[31], 31'd0};
    return {a[31], a[30:23] - 8'd1, a[22:0]};
  endfunction

  // Float to signed fixed point with FRAC fractional bits, rounded toward zero,
  // saturated to 63 bits of magnitude. The caller keeps the bits it needs.
  function automatic logic signed [63:0] fp_to_fix(input f32_t a, input int frac);
    logic [63:0] m;
    int          sh;
    if (a[30:23] == 8'h00) return 64'sd0;
    sh = int'(a[30:23]) - 150 + frac;
    m  = {40'd0, 1'b1, a[22:0]};
    if (sh >= 39)      m = 64'h7FFF_FFFF_FFFF_FFFF;
    else if (sh >= 0)  m = m << sh;
    else if (sh > -64) m = m >> (-sh);
    else               m = 64'd0;
    return a[31] ? -$signed(m) : $signed(m);
  endfunction

  // Signed fixed point with FRAC fractional bits to float, rounded to nearest even.
  function automatic f32_t fix_to_fp(input logic signed [63:0] v, input int frac);
    logic        s;
    logic [63:0] m;
    int          p;
    if (v == 64'sd0) return 32'h0;
    s = v[63];
    m = s ? 64'(-v) : 64'(v);
    p = 0;
    for (int i = 0; i < 64; i++) if (m[i]) p = i;
    m = m << (63 - p);
    return fp_pack(s, p - frac + 127, m[63:40], m[39], |m[38:0]);
  endfunction

  function automatic cplx_t c_add(input cplx_t a, input cplx_t b);
    return '{im: fp_add(a.im, b.im), re: fp_add(a.re, b.re)};
  endfunction

  function automatic cplx_t c_sub(input cplx_t a, input cplx_t b);
    return '{im: fp_sub(a.im, b.im), re: fp_sub(a.re, b.re)};
  endfunction

  function automatic cplx_t c_mul(input cplx_t a, input cplx_t b);
    return '{re: fp_sub(fp_mul(a.re, b.re), fp_mul(a.im, b.im)),
             im: fp_add(fp_mul(a.re, b.im), fp_mul(a.im, b.re))};
  endfunction

endpackage
