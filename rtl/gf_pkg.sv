// gf_pkg: shared types and constant functions for GF(2^8) Reed-Solomon logic.
//
// The field is GF(2^8) built on the primitive polynomial x^8+x^4+x^3+x^2+1
// (0x11D), the polynomial of the compact-disc RS codes; alpha = 0x02.
// Elements are in the standard (polynomial) basis, bit i = coefficient of
// alpha^i. gf_mul is a shift-and-reduce product usable both in constant
// expressions (generator coefficients, Chien start values) and in logic.
// The default code is the shortened RS(32,28) code with 2t = 4 parity
// symbols and generator roots alpha^1 .. alpha^2t.
package gf_pkg;

  localparam int unsigned GF_M = 8;
  // Field polynomial without its x^8 term.
  localparam logic [GF_M-1:0] GF_POLY = 8'h1D;
  // Number of non-zero field elements.
  localparam int unsigned GF_Q1 = (1 << GF_M) - 1;

  typedef logic [GF_M-1:0] gf_t;

  // a*b mod the field polynomial, by shift and add.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t p = '0;
    gf_t x = a;
    for (int i = 0; i < GF_M; i++) begin
      p = p ^ (b[i] ? x : gf_t'(0));
      x = {x[GF_M-2:0], 1'b0} ^ (x[GF_M-1] ? GF_POLY : gf_t'(0));
    end
    return p;
  endfunction

  // alpha^e; for constant expressions.
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    r = gf_t'(1);
    for (int unsigned i = 0; i < (e % GF_Q1); i++) r = gf_mul(r, gf_t'(2));
    return r;
  endfunction

  // Coefficient of x^idx in g(x) = prod_{j=1}^{nroots} (x + alpha^j).
  function automatic gf_t gen_coef(int unsigned nroots, int unsigned idx);
    gf_t g [0:64];
    gf_t r;
    for (int i = 0; i <= 64; i++) g[i] = '0;
    g[0] = gf_t'(1);
    for (int unsigned j = 1; j <= nroots; j++) begin
      r = gf_alpha_pow(j);
      for (int unsigned k = j; k >= 1; k--) g[k] = g[k-1] ^ gf_mul(g[k], r);
      g[0] = gf_mul(g[0], r);
    end
    return g[idx];
  endfunction

endpackage
