// fp_ref_pkg: reference model for the testbenches.  Single-precision results
// are computed in double precision (exact for a product of two singles, and
// for a sum unless the exponents differ by a lot) and rounded to single with
// round-to-nearest-even by bit manipulation.  Like the design, subnormals are
// read as zero and results below the normal range are flushed to zero.  The
// Heun step is modelled with the same order of operations as the hardware.
package fp_ref_pkg;

  typedef logic [31:0] f32_t;
  typedef struct packed { f32_t x; f32_t y; f32_t z; } vec_t;

  function automatic real f2r(input f32_t f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    if (f[30:23] == 8'hFF) begin
      d = (f[22:0] != 0) ? 64'h7FF8_0000_0000_0000 : {f[31], 11'h7FF, 52'd0};
      return $bitstoreal(d);
    end
    d = {f[31], 11'(int'(f[30:23]) + 896), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic f32_t r2f(input real r);
    logic [63:0] d;
    logic [24:0] sig;
    logic        sign, guard, sticky;
    int          e;
    d    = $realtobits(r);
    sign = d[63];
    if (d[62:52] == 11'd0) return {sign, 31'd0};
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {sign, 8'hFF, 23'd0};
    e      = int'(d[62:52]) - 1023 + 127;
    sig    = {2'b01, d[51:29]};
    guard  = d[28];
    sticky = (d[27:0] != 0);
    if (guard && (sticky || sig[0])) sig = sig + 25'd1;
    if (sig[24]) begin
      sig = sig >> 1;
      e   = e + 1;
    end
    if (e >= 255) return {sign, 8'hFF, 23'd0};
    if (e <= 0)   return {sign, 31'd0};
    return {sign, 8'(e), sig[22:0]};
  endfunction

  function automatic f32_t ref_add(input f32_t a, input f32_t b);
    real s;
    s = f2r(a) + f2r(b);
    if (s == 0.0) return (a[31] && b[31] && f2r(a) == 0.0) ? 32'h8000_0000 : 32'h0;
    return r2f(s);
  endfunction

  function automatic f32_t ref_mul(input f32_t a, input f32_t b);
    real p;
    p = f2r(a) * f2r(b);
    if (p == 0.0) return {a[31] ^ b[31], 31'd0};
    return r2f(p);
  endfunction

  function automatic f32_t ref_div(input f32_t a, input f32_t b);
    real q;
    q = f2r(a) / f2r(b);
    if (q == 0.0) return {a[31] ^ b[31], 31'd0};
    return r2f(q);
  endfunction

  function automatic logic is_finite(input f32_t f);
    return f[30:23] != 8'hFF;
  endfunction

  // Random normal number with exponent field in [emin, emax].
  function automatic f32_t rand_fp(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // Random number of magnitude below about 2^lim (lim < 127).
  function automatic f32_t rand_small(input int lim);
    return rand_fp(127 - 20, 127 + lim - 1);
  endfunction

  function automatic vec_t ref_f(input vec_t p, input f32_t ca, input f32_t cb, input f32_t cc);
    f32_t ax, by, cz, xx, s1, s2, s;
    vec_t f;
    ax = ref_mul(ca, p.x);
    by = ref_mul(cb, p.y);
    cz = ref_mul(cc, p.z);
    xx = ref_mul(p.x, p.x);
    s1 = ref_add(ax, by);
    s2 = ref_add(cz, xx);
    s  = ref_add(s1, s2);
    f.x = p.y;
    f.y = p.z;
    f.z = {~s[31], s[30:0]};
    return f;
  endfunction

  function automatic vec_t vmul(input vec_t v, input f32_t s);
    return '{x: ref_mul(s, v.x), y: ref_mul(s, v.y), z: ref_mul(s, v.z)};
  endfunction

  function automatic vec_t vadd(input vec_t a, input vec_t b);
    return '{x: ref_add(a.x, b.x), y: ref_add(a.y, b.y), z: ref_add(a.z, b.z)};
  endfunction

  function automatic vec_t vdiv(input vec_t v, input f32_t d);
    return '{x: ref_div(v.x, d), y: ref_div(v.y, d), z: ref_div(v.z, d)};
  endfunction

  // One Heun step, same operation order as the generator unit.
  function automatic vec_t ref_step(input vec_t xn, input f32_t h,
                                    input f32_t ca, input f32_t cb, input f32_t cc);
    vec_t hk1, xp, hk2;
    hk1 = vmul(ref_f(xn, ca, cb, cc), h);
    xp  = vadd(xn, hk1);
    hk2 = vmul(ref_f(xp, ca, cb, cc), h);
    return vadd(xn, vdiv(vadd(hk1, hk2), 32'h4000_0000));
  endfunction

  // The same step in double precision, for an independent sanity bound.
  function automatic void step_real(inout real x, inout real y, inout real z, input real h,
                                    input real a, input real b, input real c);
    real fx, fy, fz, px, py, pz, gx, gy, gz;
    fx = y; fy = z; fz = -a*x - b*y - c*z - x*x;
    px = x + h*fx; py = y + h*fy; pz = z + h*fz;
    gx = py; gy = pz; gz = -a*px - b*py - c*pz - px*px;
    x = x + h*(fx + gx)/2.0;
    y = y + h*(fy + gy)/2.0;
    z = z + h*(fz + gz)/2.0;
  endfunction

endpackage
