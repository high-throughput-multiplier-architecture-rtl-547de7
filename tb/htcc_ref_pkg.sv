// htcc_ref_pkg: reference model for the point-multiplier testbenches.
//
// Works on elements of GF(2^m), m <= 283, held in 283-bit words, with the
// reduction tail passed in (p^m = poly). Multiplication is schoolbook (full
// 2m-1 bit product, then reduction from the top), inversion is by Fermat's
// little theorem, a^(2^m - 2). Point arithmetic is in affine coordinates with
// the textbook chord-and-tangent formulas, so it shares nothing with the
// projective formulas of the design under test. Also provides random curve
// and point generation and the check of a projective result against an affine
// one: A = x*C^2, B = y*C^3.
package htcc_ref_pkg;

  localparam int unsigned W = 283;
  typedef logic [W-1:0] fe_t;

  typedef struct {
    fe_t x;
    fe_t y;
    bit  inf;
  } apoint_t;

  function automatic fe_t f_mul(fe_t a, fe_t b, int m, fe_t poly);
    logic [2*W-1:0] p;
    logic [2*W-1:0] h;
    p = '0;
    for (int i = 0; i < m; i++) if (b[i]) p = p ^ ({{W{1'b0}}, a} << i);
    h = {{W{1'b0}}, poly};
    for (int i = 2 * m - 2; i >= m; i--)
      if (p[i]) begin
        p[i] = 1'b0;
        p = p ^ (h << (i - m));
      end
    return p[W-1:0];
  endfunction

  function automatic fe_t f_sqr(fe_t a, int m, fe_t poly);
    return f_mul(a, a, m, poly);
  endfunction

  function automatic fe_t f_inv(fe_t a, int m, fe_t poly);
    fe_t r;
    r = fe_t'(1);
    for (int i = m - 1; i >= 1; i--) r = f_mul(f_sqr(r, m, poly), a, m, poly);
    return f_sqr(r, m, poly);
  endfunction

  function automatic fe_t f_mask(int m);
    fe_t r;
    r = '0;
    for (int i = 0; i < m; i++) r[i] = 1'b1;
    return r;
  endfunction

  function automatic fe_t f_rand(int m);
    logic [287:0] t;
    for (int i = 0; i < 288; i += 32) t[i +: 32] = $urandom();
    return t[W-1:0] & f_mask(m);
  endfunction

  // Affine doubling on q^2 + pq = p^3 + a p^2 + b.
  function automatic apoint_t a_double(apoint_t p1, fe_t ca, int m, fe_t poly);
    apoint_t r;
    fe_t lam;
    if (p1.inf || p1.x == '0) begin
      r.inf = 1'b1; r.x = '0; r.y = '0; return r;
    end
    lam = p1.x ^ f_mul(p1.y, f_inv(p1.x, m, poly), m, poly);
    r.inf = 1'b0;
    r.x = f_sqr(lam, m, poly) ^ lam ^ ca;
    r.y = f_sqr(p1.x, m, poly) ^ f_mul(lam ^ fe_t'(1), r.x, m, poly);
    return r;
  endfunction

  function automatic apoint_t a_add(apoint_t p1, apoint_t p2, fe_t ca, int m, fe_t poly);
    apoint_t r;
    fe_t lam;
    if (p1.inf) return p2;
    if (p2.inf) return p1;
    if (p1.x == p2.x) begin
      if (p1.y == p2.y) return a_double(p1, ca, m, poly);
      r.inf = 1'b1; r.x = '0; r.y = '0; return r;
    end
    lam = f_mul(p1.y ^ p2.y, f_inv(p1.x ^ p2.x, m, poly), m, poly);
    r.inf = 1'b0;
    r.x = f_sqr(lam, m, poly) ^ lam ^ p1.x ^ p2.x ^ ca;
    r.y = f_mul(lam, p1.x ^ r.x, m, poly) ^ r.x ^ p1.y;
    return r;
  endfunction

  // s * P, left-to-right over the m key bits.
  function automatic apoint_t a_smul(fe_t s, apoint_t p1, fe_t ca, int m, fe_t poly);
    apoint_t g;
    g.inf = 1'b1; g.x = '0; g.y = '0;
    for (int j = m - 1; j >= 0; j--) begin
      g = a_double(g, ca, m, poly);
      if (s[j]) g = a_add(g, p1, ca, m, poly);
    end
    return g;
  endfunction

  // Curve constant b that puts (x, y) on q^2 + pq = p^3 + a p^2 + b.
  function automatic fe_t curve_b_for(fe_t x, fe_t y, fe_t ca, int m, fe_t poly);
    fe_t x2;
    x2 = f_sqr(x, m, poly);
    return f_sqr(y, m, poly) ^ f_mul(x, y, m, poly) ^ f_mul(x2, x, m, poly)
         ^ f_mul(ca, x2, m, poly);
  endfunction

  // Curve (a, b) on which (x, y), x != 0, has order 3:
  // b = x^4 + x^3 makes x(2P) = x^2 + b/x^2 equal x, and a follows from the
  // curve equation, a = (y^2 + xy + x^4) / x^2.
  function automatic void order3_curve(fe_t x, fe_t y, int m, fe_t poly,
                                       output fe_t ca, output fe_t cb);
    fe_t x2, x4;
    x2 = f_sqr(x, m, poly);
    x4 = f_sqr(x2, m, poly);
    cb = x4 ^ f_mul(x2, x, m, poly);
    ca = f_mul(f_sqr(y, m, poly) ^ f_mul(x, y, m, poly) ^ x4,
               f_inv(x2, m, poly), m, poly);
  endfunction

  // Does projective (A, B, C), p = A/C^2, q = B/C^3, equal the affine point?
  function automatic bit proj_matches(fe_t pa, fe_t pb, fe_t pc, apoint_t e, int m, fe_t poly);
    fe_t c2;
    if (e.inf) return (pc == '0);
    if (pc == '0) return 1'b0;
    c2 = f_sqr(pc, m, poly);
    return (pa == f_mul(e.x, c2, m, poly)) && (pb == f_mul(e.y, f_mul(c2, pc, m, poly), m, poly));
  endfunction

  // Random projective representation (x*l^2, y*l^3, l) of an affine point;
  // the point at infinity becomes (l^2, l^3, 0).
  function automatic void to_proj(apoint_t e, fe_t l, int m, fe_t poly,
                                  output fe_t pa, output fe_t pb, output fe_t pc);
    fe_t l2;
    l2 = f_sqr(l, m, poly);
    if (e.inf) begin
      pa = l2; pb = f_mul(l2, l, m, poly); pc = '0;
    end else begin
      pa = f_mul(e.x, l2, m, poly);
      pb = f_mul(e.y, f_mul(l2, l, m, poly), m, poly);
      pc = l;
    end
  endfunction

  function automatic fe_t f_rand_nz(int m);
    fe_t r;
    do r = f_rand(m); while (r == '0);
    return r;
  endfunction

endpackage
