// rs_ref_pkg: reference GF(2^8) and Reed-Solomon arithmetic for the
// testbenches.
//
// Independent of the RTL's multipliers: products are taken through
// logarithm/antilogarithm tables (built once from the primitive polynomial
// x^8+x^4+x^3+x^2+1), parity by long division of x^(n-k) M(x) by the
// generator, and syndromes by direct evaluation of r(alpha^j) term by term.
package rs_ref_pkg;

  typedef logic [7:0] sym_t;

  sym_t exp_t [0:509];
  int   log_t [0:255];
  bit   ready = 1'b0;

  function automatic void init();
    int x;
    if (ready) return;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = sym_t'(x);
      log_t[x] = i;
      x = x << 1;
      if (x & 'h100) x = x ^ 'h11D;
    end
    for (int i = 255; i < 510; i++) exp_t[i] = exp_t[i-255];
    log_t[0] = -1;
    ready = 1'b1;
  endfunction

  function automatic sym_t rmul(sym_t a, sym_t b);
    init();
    if (a == 0 || b == 0) return 8'h00;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic sym_t rinv(sym_t a);
    init();
    if (a == 0) return 8'h00;
    return exp_t[(255 - log_t[a]) % 255];
  endfunction

  function automatic sym_t rpow(int e);
    init();
    e = e % 255;
    if (e < 0) e += 255;
    return exp_t[e];
  endfunction

  // g(x) = prod_{i=1}^{nr} (x + alpha^i); g[i] = coefficient of x^i.
  function automatic void gen_poly(int nr, ref sym_t g[]);
    g = new[nr+1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int j = 1; j <= nr; j++)
      for (int k = j; k >= 0; k--)
        g[k] = rmul(g[k], rpow(j)) ^ ((k > 0) ? g[k-1] : 8'h00);
  endfunction

  // Systematic codeword: msg (msg[0] sent first = highest power) then parity.
  function automatic void encode(int n, int k, const ref sym_t msg[], ref sym_t cw[]);
    sym_t g[];
    sym_t rem[];
    sym_t f;
    int nr = n - k;
    gen_poly(nr, g);
    rem = new[n];
    for (int i = 0; i < k; i++) rem[i] = msg[i];
    for (int i = k; i < n; i++) rem[i] = 0;
    // rem[i] is the coefficient of x^(n-1-i); divide by monic g.
    for (int i = 0; i < k; i++) begin
      f = rem[i];
      if (f != 0)
        for (int j = 0; j <= nr; j++) rem[i+j] ^= rmul(f, g[nr-j]);
    end
    cw = new[n];
    for (int i = 0; i < k; i++) cw[i] = msg[i];
    for (int i = k; i < n; i++) cw[i] = rem[i];
  endfunction

  // S_j = sum_i r[i] alpha^(j (n-1-i)), j = 1..nr; s[j-1] = S_j.
  function automatic void syndromes(int n, int nr, const ref sym_t r[], ref sym_t s[]);
    s = new[nr];
    for (int j = 1; j <= nr; j++) begin
      s[j-1] = 0;
      for (int i = 0; i < n; i++) s[j-1] ^= rmul(r[i], rpow(j * (n - 1 - i)));
    end
  endfunction

  // sigma(x) = prod_l (1 + X_l x), X_l = alpha^(n-1-pos_l); w coefficients.
  function automatic void locator(int n, int w, const ref int pos[$], ref sym_t sg[]);
    sym_t x;
    sg = new[w];
    foreach (sg[i]) sg[i] = 0;
    sg[0] = 1;
    foreach (pos[l]) begin
      x = rpow(n - 1 - pos[l]);
      for (int i = w - 1; i >= 1; i--) sg[i] ^= rmul(sg[i-1], x);
    end
  endfunction

  // omega(x) = S(x) sigma(x) mod x^nr, S(x) = S_1 + S_2 x + ...
  function automatic void evaluator(int nr, const ref sym_t s[], const ref sym_t sg[], ref sym_t om[]);
    om = new[nr];
    for (int k = 0; k < nr; k++) begin
      om[k] = 0;
      for (int i = 0; i <= k && i < sg.size(); i++) om[k] ^= rmul(sg[i], s[k-i]);
    end
  endfunction

endpackage
