// gf_ref_pkg: reference arithmetic for the testbenches.
//
// Straightforward software models, written independently of the RTL:
// GF(2^m) multiplication LSB first (the RTL works MSB first), inversion by
// Fermat's little theorem (a^(2^m - 2)), and elliptic curve point addition and
// doubling in affine coordinates with a field inversion per operation (the
// RTL uses projective coordinates and never inverts).  Elements are KMAX bits
// wide; f(x) = x^m + r(x).
package gf_ref_pkg;

  localparam int unsigned KMAX = 163;
  typedef logic [KMAX-1:0] fe_t;

  typedef struct {
    fe_t  x;
    fe_t  y;
    logic inf;
  } apt_t;

  function automatic fe_t fmask(input int m);
    return ~({KMAX{1'b1}} << m);
  endfunction

  function automatic fe_t gf_mul(input fe_t a, input fe_t b, input int m, input fe_t r);
    fe_t res, t;
    logic top;
    res = '0;
    t   = a;
    for (int i = 0; i < m; i++) begin
      if (b[i]) res ^= t;
      top = t[m-1];
      t   = (t << 1) & fmask(m);
      if (top) t ^= r;
    end
    return res;
  endfunction

  function automatic fe_t gf_sq(input fe_t a, input int m, input fe_t r);
    return gf_mul(a, a, m, r);
  endfunction

  function automatic fe_t gf_inv(input fe_t a, input int m, input fe_t r);
    fe_t res, t;
    res = fe_t'(1);
    t   = a;
    for (int i = 1; i < m; i++) begin
      t   = gf_sq(t, m, r);
      res = gf_mul(res, t, m, r);
    end
    return res;
  endfunction

  // b^(1/4) = b^(2^(m-2))
  function automatic fe_t gf_root4(input fe_t b, input int m, input fe_t r);
    fe_t t;
    t = b;
    for (int i = 0; i < m - 2; i++) t = gf_sq(t, m, r);
    return t;
  endfunction

  function automatic fe_t rand_fe(input int m);
    fe_t v;
    for (int i = 0; i < KMAX; i += 32) v[i +: 32] = $urandom;
    return v & fmask(m);
  endfunction

  function automatic apt_t pt_dbl(input apt_t p, input fe_t a, input int m, input fe_t r);
    apt_t q;
    fe_t  l;
    if (p.inf || p.x == '0) begin
      q.x = '0; q.y = '0; q.inf = 1'b1;
      return q;
    end
    l     = p.x ^ gf_mul(p.y, gf_inv(p.x, m, r), m, r);
    q.x   = gf_sq(l, m, r) ^ l ^ a;
    q.y   = gf_sq(p.x, m, r) ^ gf_mul(l ^ fe_t'(1), q.x, m, r);
    q.inf = 1'b0;
    return q;
  endfunction

  function automatic apt_t pt_add(input apt_t p, input apt_t q, input fe_t a,
                                  input int m, input fe_t r);
    apt_t s;
    fe_t  l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pt_dbl(p, a, m, r);
      s.x = '0; s.y = '0; s.inf = 1'b1;
      return s;
    end
    l     = gf_mul(p.y ^ q.y, gf_inv(p.x ^ q.x, m, r), m, r);
    s.x   = gf_sq(l, m, r) ^ l ^ p.x ^ q.x ^ a;
    s.y   = gf_mul(l, p.x ^ s.x, m, r) ^ s.x ^ p.y;
    s.inf = 1'b0;
    return s;
  endfunction

  // n * P, binary method, least significant bit first (the RTL goes MSB first).
  function automatic apt_t pt_smul(input fe_t n, input apt_t p, input fe_t a,
                                   input int m, input fe_t r);
    apt_t acc, t;
    acc.x = '0; acc.y = '0; acc.inf = 1'b1;
    t = p;
    for (int i = 0; i < KMAX; i++) begin
      if (n[i]) acc = pt_add(acc, t, a, m, r);
      t = pt_dbl(t, a, m, r);
    end
    return acc;
  endfunction

  // Jacobian projective (X, Y, Z) -> affine.
  function automatic apt_t to_affine(input fe_t xx, input fe_t yy, input fe_t zz,
                                     input int m, input fe_t r);
    apt_t p;
    fe_t  zi, zi2;
    if (zz == '0) begin
      p.x = '0; p.y = '0; p.inf = 1'b1;
      return p;
    end
    zi    = gf_inv(zz, m, r);
    zi2   = gf_sq(zi, m, r);
    p.x   = gf_mul(xx, zi2, m, r);
    p.y   = gf_mul(yy, gf_mul(zi2, zi, m, r), m, r);
    p.inf = 1'b0;
    return p;
  endfunction

  // A random curve through a random point: pick x, y, a, then b follows.
  function automatic void rand_curve(input int m, input fe_t r,
                                     output fe_t a, output fe_t b, output apt_t p);
    fe_t x2;
    do begin
      p.x = rand_fe(m);
      p.y = rand_fe(m);
      a   = rand_fe(m);
      x2  = gf_sq(p.x, m, r);
      b   = gf_sq(p.y, m, r) ^ gf_mul(p.x, p.y, m, r) ^ gf_mul(x2, p.x, m, r)
            ^ gf_mul(a, x2, m, r);
    end while (b == '0 || p.x == '0);
    p.inf = 1'b0;
  endfunction

  // Field polynomials used by the tests (f = x^m + r).
  localparam fe_t R163 = fe_t'((1 << 7) | (1 << 6) | (1 << 3) | 1);   // x^163+x^7+x^6+x^3+1
  localparam fe_t R113 = fe_t'((1 << 9) | 1);                         // x^113+x^9+1

endpackage
