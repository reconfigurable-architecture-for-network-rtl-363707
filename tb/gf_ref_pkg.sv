// gf_ref_pkg: reference arithmetic for the testbenches, written for clarity
// rather than speed and independently of the RTL structure.
//
// Field GF(2^193) with reduction polynomial x^193 + x^15 + 1. Multiplication
// is the bit-serial MSB-first shift-and-add method with the reduction
// interleaved; inversion is Fermat's a^(2^193 - 2) by square-and-multiply;
// curve arithmetic is affine double-and-add on y^2 + xy = x^3 + a x^2 + b
// with explicit handling of the point at infinity.
package gf_ref_pkg;

  localparam int RM = 193;
  localparam int RK = 15;

  typedef logic [RM-1:0]   fe_t;
  typedef logic [2*RM-2:0] fe2_t;

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } rpt_t;

  // Carry-less (polynomial) product, unreduced.
  function automatic fe2_t clmul(fe_t a, fe_t b);
    fe2_t r = '0;
    for (int i = 0; i < RM; i++)
      if (b[i]) r ^= (fe2_t'(a) << i);
    return r;
  endfunction

  // Field product, reduction interleaved with the shifts.
  function automatic fe_t fmul(fe_t a, fe_t b);
    logic [RM:0] r = '0;
    for (int i = RM-1; i >= 0; i--) begin
      r = r << 1;
      if (r[RM]) begin
        r[RM] = 1'b0; r[RK] ^= 1'b1; r[0] ^= 1'b1;
      end
      if (b[i]) r[RM-1:0] ^= a;
    end
    return r[RM-1:0];
  endfunction

  function automatic fe_t fsqr(fe_t a);
    return fmul(a, a);
  endfunction

  // a^(2^n)
  function automatic fe_t fsqrn(fe_t a, int n);
    fe_t r = a;
    for (int i = 0; i < n; i++) r = fsqr(r);
    return r;
  endfunction

  // a^-1 = a^(2^RM - 2) = product of a^(2^i), i = 1 .. RM-1.
  function automatic fe_t finv(fe_t a);
    fe_t s = a, r = fe_t'(1);
    for (int i = 1; i < RM; i++) begin
      s = fsqr(s);
      r = fmul(r, s);
    end
    return r;
  endfunction

  // Reduction of a double-length polynomial, using x^193 = x^15 + 1.
  function automatic fe_t freduce(fe2_t c);
    fe_t lo = c[RM-1:0];
    fe_t hi = fe_t'(c >> RM);
    fe_t t  = '0;
    t[RK] = 1'b1; t[0] = 1'b1;
    return lo ^ fmul(hi, t);
  endfunction

  function automatic rpt_t padd(rpt_t p, rpt_t q, fe_t ca);
    rpt_t r;
    fe_t lam;
    r.inf = 1'b0; r.x = '0; r.y = '0;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == '0) begin r.inf = 1'b1; return r; end
      lam = p.x ^ fmul(p.y, finv(p.x));
      r.x = fsqr(lam) ^ lam ^ ca;
      r.y = fsqr(p.x) ^ fmul(lam ^ fe_t'(1), r.x);
      return r;
    end
    lam = fmul(p.y ^ q.y, finv(p.x ^ q.x));
    r.x = fsqr(lam) ^ lam ^ p.x ^ q.x ^ ca;
    r.y = fmul(lam, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic rpt_t pneg(rpt_t p);
    rpt_t r = p;
    r.y = p.x ^ p.y;
    return r;
  endfunction

  function automatic rpt_t smul(fe_t k, rpt_t p, fe_t ca);
    rpt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    for (int i = RM-1; i >= 0; i--) begin
      r = padd(r, r, ca);
      if (k[i]) r = padd(r, p, ca);
    end
    return r;
  endfunction

  function automatic logic on_curve(rpt_t p, fe_t ca, fe_t cb);
    fe_t x2;
    if (p.inf) return 1'b1;
    x2 = fsqr(p.x);
    return (fsqr(p.y) ^ fmul(p.x, p.y)) == (fmul(x2, p.x) ^ fmul(ca, x2) ^ cb);
  endfunction

  function automatic fe_t frand();
    fe_t r = '0;
    for (int i = 0; i < 7; i++) r = (r << 32) | fe_t'($urandom);
    return r;
  endfunction

endpackage
