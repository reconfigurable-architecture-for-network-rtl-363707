// gnb_ref_pkg: reference arithmetic in GF(2^163), type-4 Gaussian normal
// basis, for the testbenches of the GF(2^163) processor.
//
// Multiplication applies the normal-basis product formula term by term on
// whole vectors: c = XOR over k of rotr(a, F(k+1)) & rotr(b, F(p-k)), where
// rotr(v, s)_i = v_((i+s) mod 163) and F is built from p = 653 and an element
// of order 4 modulo p. Inversion walks the bits of 162 (square-and-multiply
// on b_n = a^(2^n - 1)); curve arithmetic is affine double-and-add on
// y^2 + xy = x^3 + a x^2 + b. Call gnb_init() once before use.
package gnb_ref_pkg;

  localparam int NM = 163;
  localparam int NT = 4;
  localparam int NP = NT * NM + 1;

  typedef logic [NM-1:0] nfe_t;

  typedef struct packed {
    logic inf;
    nfe_t x;
    nfe_t y;
  } npt_t;

  int ftab [NP];

  function automatic void gnb_init();
    int u = 0, w = 1;
    for (int c = 2; c < NP && u == 0; c++)
      if ((c * c) % NP == NP - 1) u = c;
    for (int i = 0; i < NM; i++) begin
      int v = w;
      for (int j = 0; j < NT; j++) begin
        ftab[v] = i;
        v = (v * u) % NP;
      end
      w = (w * 2) % NP;
    end
  endfunction

  function automatic nfe_t rotr(nfe_t v, int s);
    logic [2*NM-1:0] d = {v, v};
    return nfe_t'(d >> (s % NM));
  endfunction

  function automatic nfe_t nsqr(nfe_t v);    // squaring: bit i takes bit i-1
    return {v[NM-2:0], v[NM-1]};
  endfunction

  function automatic nfe_t nsqrn(nfe_t v, int n);
    for (int i = 0; i < n; i++) v = nsqr(v);
    return v;
  endfunction

  function automatic nfe_t nmul(nfe_t a, nfe_t b);
    nfe_t c = '0;
    for (int k = 1; k <= NP - 2; k++)
      c ^= rotr(a, ftab[k + 1]) & rotr(b, ftab[NP - k]);
    return c;
  endfunction

  function automatic nfe_t ninv(nfe_t a);
    nfe_t be = a;     // b_n with n = 1
    int   n  = 1;
    for (int bit_i = 6; bit_i >= 0; bit_i--) begin    // 162 = 8'b10100010
      be = nmul(nsqrn(be, n), be); n = 2 * n;
      if ((162 >> bit_i) & 1) begin be = nmul(nsqr(be), a); n = n + 1; end
    end
    return nsqr(be);
  endfunction

  function automatic npt_t npadd(npt_t p, npt_t q, nfe_t ca);
    npt_t r;
    nfe_t lam, one = '1;
    r.inf = 1'b0; r.x = '0; r.y = '0;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == '0) begin r.inf = 1'b1; return r; end
      lam = p.x ^ nmul(p.y, ninv(p.x));
      r.x = nsqr(lam) ^ lam ^ ca;
      r.y = nsqr(p.x) ^ nmul(lam ^ one, r.x);
      return r;
    end
    lam = nmul(p.y ^ q.y, ninv(p.x ^ q.x));
    r.x = nsqr(lam) ^ lam ^ p.x ^ q.x ^ ca;
    r.y = nmul(lam, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic npt_t nsmul(nfe_t k, npt_t p, nfe_t ca);
    npt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    for (int i = NM-1; i >= 0; i--) begin
      r = npadd(r, r, ca);
      if (k[i]) r = npadd(r, p, ca);
    end
    return r;
  endfunction

  function automatic nfe_t nrand();
    nfe_t r = '0;
    for (int i = 0; i < 6; i++) r = (r << 32) | nfe_t'($urandom);
    return r;
  endfunction

endpackage
