// tb_gf_ref_pkg: slow, obviously-correct reference arithmetic for the
// testbenches, written independently of the RTL.
//
// Field multiplication is the plain bit-serial shift-and-add method with a
// reduction after every shift; inversion is Fermat's square-and-multiply
// a^(2^m - 2); point arithmetic uses the affine chord-and-tangent formulas of
// y^2 + xy = x^3 + a x^2 + b and double-and-add scalar multiplication. None
// of this shares code with the design under test.
package tb_gf_ref_pkg;

  localparam int M = 163;
  typedef logic [M-1:0] fe_t;
  localparam fe_t RTAIL = 163'hC9;       // x^163 = x^7 + x^6 + x^3 + 1

  typedef struct {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  function automatic fe_t ref_mul(fe_t a, fe_t b);
    fe_t c = '0;
    for (int i = M - 1; i >= 0; i--) begin
      logic top = c[M-1];
      c = c << 1;
      if (top) c ^= RTAIL;
      if (b[i]) c ^= a;
    end
    return c;
  endfunction

  function automatic fe_t ref_sqr(fe_t a);
    return ref_mul(a, a);
  endfunction

  function automatic fe_t ref_inv(fe_t a);
    fe_t r = a;
    for (int i = 1; i <= M - 2; i++) r = ref_mul(ref_sqr(r), a);
    return ref_sqr(r);
  endfunction

  function automatic pt_t ref_add(pt_t p, pt_t q, fe_t ca);
    pt_t r;
    fe_t l;
    r.inf = 1'b0;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == '0) begin
        r.inf = 1'b1; r.x = '0; r.y = '0;
        return r;
      end
      // doubling
      l   = p.x ^ ref_mul(p.y, ref_inv(p.x));
      r.x = ref_sqr(l) ^ l ^ ca;
      r.y = ref_sqr(p.x) ^ ref_mul(l, r.x) ^ r.x;
      return r;
    end
    l   = ref_mul(p.y ^ q.y, ref_inv(p.x ^ q.x));
    r.x = ref_sqr(l) ^ l ^ p.x ^ q.x ^ ca;
    r.y = ref_mul(l, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t ref_smul(fe_t k, pt_t p, fe_t ca);
    pt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = ref_add(r, r, ca);
      if (k[i]) r = ref_add(r, p, ca);
    end
    return r;
  endfunction

  function automatic fe_t rand_fe();
    logic [191:0] v;
    for (int i = 0; i < 192; i += 32) v[i +: 32] = $urandom;
    return v[M-1:0];
  endfunction

endpackage
