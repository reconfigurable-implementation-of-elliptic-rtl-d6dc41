// ecc_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: GF(2^191) with f(x) = x^191 + x^9 + 1,
// right-to-left multiplication, inversion by the extended Euclidean
// algorithm, and affine point doubling, addition and double-and-add
// scalar multiplication on y^2 + xy = x^3 + a x^2 + b.
package ecc_ref_pkg;
  localparam int FN = 191;
  typedef logic [FN-1:0] fe_t;
  typedef struct { fe_t x; fe_t y; bit inf; } pt_t;

  function automatic fe_t fmul(fe_t a, fe_t b);
    fe_t r = '0;
    fe_t t = a;
    for (int i = 0; i < FN; i++) begin
      if (b[i]) r ^= t;
      t = {t[FN-2:0], 1'b0} ^ (t[FN-1] ? fe_t'(191'h201) : '0);
    end
    return r;
  endfunction

  function automatic fe_t fsqr(fe_t a);
    return fmul(a, a);
  endfunction

  function automatic int deg(logic [255:0] p);
    for (int i = 255; i >= 0; i--) if (p[i]) return i;
    return -1;
  endfunction

  function automatic fe_t finv(fe_t a);
    logic [255:0] u, v, g1, g2, t;
    int j;
    u = 256'(a);
    v = (256'(1) << FN) | 256'h201;
    g1 = 256'd1;
    g2 = '0;
    while (u != 256'd1) begin
      j = deg(u) - deg(v);
      if (j < 0) begin
        t = u; u = v; v = t;
        t = g1; g1 = g2; g2 = t;
        j = -j;
      end
      u ^= v << j;
      g1 ^= g2 << j;
    end
    // g1 may exceed degree FN-1 only transiently; reduce it
    for (int k = 255; k >= FN; k--)
      if (g1[k]) g1 ^= ((256'(1) << FN) | 256'h201) << (k - FN);
    return g1[FN-1:0];
  endfunction

  function automatic pt_t pdbl(pt_t p, fe_t a);
    pt_t r;
    fe_t l;
    if (p.inf || p.x == '0) begin r.inf = 1; r.x = '0; r.y = '0; return r; end
    l = p.x ^ fmul(p.y, finv(p.x));
    r.x = fsqr(l) ^ l ^ a;
    r.y = fsqr(p.x) ^ fmul(l ^ fe_t'(1), r.x);
    r.inf = 0;
    return r;
  endfunction

  function automatic pt_t padd(pt_t p, pt_t q, fe_t a);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pdbl(p, a);
      r.inf = 1; r.x = '0; r.y = '0; return r;
    end
    l = fmul(p.y ^ q.y, finv(p.x ^ q.x));
    r.x = fsqr(l) ^ l ^ p.x ^ q.x ^ a;
    r.y = fmul(l, p.x ^ r.x) ^ r.x ^ p.y;
    r.inf = 0;
    return r;
  endfunction

  function automatic pt_t pmul(fe_t m, pt_t p, fe_t a);
    pt_t r;
    r.inf = 1; r.x = '0; r.y = '0;
    for (int i = FN - 1; i >= 0; i--) begin
      r = pdbl(r, a);
      if (m[i]) r = padd(r, p, a);
    end
    return r;
  endfunction

  function automatic fe_t frand();
    fe_t r;
    for (int i = 0; i < 6; i++) r = {r[FN-33:0], 32'($urandom)};
    return r;
  endfunction
endpackage
