// rs_pkg: shared types, constants and GF(2^8) arithmetic for the Reed-Solomon
// encoder and decoder.
//
// The field is GF(2^8) built on the 802.16 field generator polynomial
// p(x) = x^8 + x^4 + x^3 + x^2 + 1, with primitive element alpha = 0x02.
// Addition is XOR; multiplication is a shift-and-add product reduced modulo
// p(x). The code generator polynomial g(x) has the 2t consecutive roots
// alpha^1 .. alpha^2t, which gives the coefficient sets printed for 802.16
// (for t = 8: 76 34 67 1F 68 7E BB E8 11 38 B7 31 64 51 2C 4F). The
// constant functions below compute g(x), powers of alpha and the table of
// multiplicative inverses at elaboration time, so no data file is needed.
// Field and generator polynomials follow the 802.16 outer code.
package rs_pkg;

  localparam int unsigned SYM_W   = 8;       // bits per symbol (m)
  localparam int unsigned FIELD_N = 255;     // 2^m - 1
  localparam logic [8:0]  PRIM_POLY = 9'h11D; // x^8+x^4+x^3+x^2+1

  typedef logic [SYM_W-1:0] sym_t;

  // Product of two field elements (bit-serial shift-and-add, unrolled).
  function automatic sym_t gf_mul(input sym_t a, input sym_t b);
    sym_t r;
    sym_t p;
    r = '0;
    p = a;
    for (int i = 0; i < SYM_W; i++) begin
      if (b[i]) r = r ^ p;
      p = {p[SYM_W-2:0], 1'b0} ^ (p[SYM_W-1] ? PRIM_POLY[SYM_W-1:0] : '0);
    end
    return r;
  endfunction

  // alpha^e for any non-negative exponent.
  function automatic sym_t gf_pow_alpha(input int unsigned e);
    sym_t r;
    r = 8'h01;
    for (int unsigned i = 0; i < (e % FIELD_N); i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // Coefficient j (j = 0 .. 2t) of g(x) = (x+alpha^1)(x+alpha^2)...(x+alpha^2t).
  function automatic sym_t gen_coef(input int unsigned t, input int unsigned j);
    sym_t g [0:2*16];
    sym_t root;
    for (int i = 0; i <= 2*16; i++) g[i] = '0;
    g[0] = 8'h01;
    root = 8'h01;
    for (int unsigned r = 1; r <= 2*t; r++) begin
      root = gf_mul(root, 8'h02);
      // multiply the running product by (x + root), highest term first
      for (int unsigned k = r; k >= 1; k--) g[k] = g[k-1] ^ gf_mul(g[k], root);
      g[0] = gf_mul(g[0], root);
    end
    root = '0;
    for (int unsigned i = 0; i <= 2*16; i++) if (i == j) root = g[i];
    return root;
  endfunction

  // Table of multiplicative inverses, entry a at bits [8a+7:8a]; the entry
  // for 0 is 0. Built from inv(alpha^e) = alpha^(255-e).
  typedef logic [256*SYM_W-1:0] inv_table_t;

  function automatic inv_table_t gf_inv_table();
    inv_table_t tab;
    sym_t fwd;
    sym_t bwd;
    tab = '0;
    fwd = 8'h01;              // alpha^e
    bwd = 8'h01;              // alpha^(255-e), stepped by alpha^-1 = alpha^254
    for (int e = 0; e < int'(FIELD_N); e++) begin
      tab[fwd*SYM_W +: SYM_W] = bwd;
      fwd = gf_mul(fwd, 8'h02);
      bwd = gf_mul(bwd, 8'h8E); // 0x8E = alpha^254
    end
    return tab;
  endfunction

endpackage
