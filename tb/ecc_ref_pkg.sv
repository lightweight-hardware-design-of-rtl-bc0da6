// ecc_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. Field elements of GF(2^163) modulo z^163 + z^7 + z^6 + z^3 + 1
// are multiplied by forming the full 325-bit carry-less product and reducing
// it afterwards, inverted by Fermat's little theorem (a^-1 = a^(2^163 - 2)),
// and points of y^2 + xy = x^3 + x^2 + 1 are added and doubled with the affine
// formulas; scalar multiplication is plain double-and-add.
package ecc_ref_pkg;
  localparam int RM = 163;
  typedef logic [RM-1:0] fe_t;
  typedef struct packed { logic inf; fe_t x; fe_t y; } pt_t;

  localparam logic [RM:0] RPOLY = (164'd1 << 163) | 164'h0C9;
  // Order of the base point of the curve.
  localparam logic [RM:0] ORDER = 164'h4000000000000000000020108A2E0CC0D99F8A5EF;

  function automatic fe_t ref_mul(fe_t a, fe_t b);
    logic [2*RM-2:0] p;
    p = '0;
    for (int i = 0; i < RM; i++) if (b[i]) p ^= (2*RM-1)'(a) << i;
    for (int i = 2*RM-2; i >= RM; i--) if (p[i]) p ^= (2*RM-1)'(RPOLY) << (i - RM);
    return p[RM-1:0];
  endfunction

  function automatic fe_t ref_sq(fe_t a);
    return ref_mul(a, a);
  endfunction

  function automatic fe_t ref_inv(fe_t a);
    fe_t r = fe_t'(1);
    fe_t s = a;
    // exponent 2^163 - 2: bits 1..162 set
    for (int i = 1; i < RM; i++) begin
      s = ref_sq(s);
      r = ref_mul(r, s);
    end
    return r;
  endfunction

  function automatic pt_t ref_dbl(pt_t p);
    pt_t r;
    fe_t l;
    if (p.inf || p.x == '0) return '{1'b1, '0, '0};
    l = p.x ^ ref_mul(p.y, ref_inv(p.x));
    r.inf = 1'b0;
    r.x = ref_sq(l) ^ l ^ fe_t'(1);
    r.y = ref_sq(p.x) ^ ref_mul(l ^ fe_t'(1), r.x);
    return r;
  endfunction

  function automatic pt_t ref_add(pt_t p, pt_t q);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return ref_dbl(p);
      return '{1'b1, '0, '0};
    end
    l = ref_mul(p.y ^ q.y, ref_inv(p.x ^ q.x));
    r.inf = 1'b0;
    r.x = ref_sq(l) ^ l ^ p.x ^ q.x ^ fe_t'(1);
    r.y = ref_mul(l, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t ref_smul(fe_t k, pt_t p);
    pt_t r = '{1'b1, '0, '0};
    for (int i = RM - 1; i >= 0; i--) begin
      r = ref_dbl(r);
      if (k[i]) r = ref_add(r, p);
    end
    return r;
  endfunction

  function automatic bit on_curve(pt_t p);
    if (p.inf) return 1'b1;
    return (ref_sq(p.y) ^ ref_mul(p.x, p.y)) ==
           (ref_mul(ref_sq(p.x), p.x) ^ ref_sq(p.x) ^ fe_t'(1));
  endfunction

  function automatic fe_t rand_fe();
    fe_t v;
    for (int i = 0; i < RM; i += 32) v = (v << 32) | fe_t'($urandom);
    return v;
  endfunction
endpackage
