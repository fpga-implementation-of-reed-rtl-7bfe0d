// rs_ref_pkg: reference Reed-Solomon arithmetic for the testbenches.
//
// Works with log/antilog tables of GF(2^8) (field polynomial 0x11D), which is
// a different route from the shift-and-add multipliers of the design, and
// with whole-polynomial long division instead of an LFSR. Words are arrays
// in transmission order: w[0] is the coefficient of x^(n-1).
package rs_ref_pkg;

  typedef logic [7:0] sym8_t;
  typedef sym8_t word_t [255];

  int unsigned exp_t [510];
  int unsigned log_t [256];
  bit tables_ready = 0;

  function automatic void init();
    int unsigned v;
    v = 1;
    for (int e = 0; e < 255; e++) begin
      exp_t[e]       = v;
      exp_t[e + 255] = v;
      log_t[v]       = e;
      v = v << 1;
      if ((v & 32'h100) != 0) v = v ^ 32'h11D;
    end
    log_t[0] = 0;
    tables_ready = 1;
  endfunction

  function automatic sym8_t mul(sym8_t a, sym8_t b);
    if (a == 0 || b == 0) return 0;
    return sym8_t'(exp_t[log_t[a] + log_t[b]]);
  endfunction

  function automatic sym8_t inv(sym8_t a);
    return sym8_t'(exp_t[(255 - log_t[a]) % 255]);
  endfunction

  function automatic sym8_t alpha_pow(int e);
    e = e % 255;
    if (e < 0) e += 255;
    return sym8_t'(exp_t[e]);
  endfunction

  // g[j] = coefficient of x^j of prod_{i=1..2t} (x + alpha^i)
  function automatic void gen_poly(int t, output sym8_t g [33]);
    for (int j = 0; j < 33; j++) g[j] = 0;
    g[0] = 1;
    for (int i = 1; i <= 2*t; i++)
      for (int j = i; j >= 0; j--)
        g[j] = (j > 0 ? g[j-1] : 8'h00) ^ mul(g[j], alpha_pow(i));
  endfunction

  // Systematic encoding by long division; msg holds k = n-2t symbols.
  function automatic void encode(int n, int t, sym8_t msg [], output word_t cw);
    sym8_t g [33];
    sym8_t a [255];
    sym8_t c;
    gen_poly(t, g);
    for (int p = 0; p < 255; p++) a[p] = 0;
    for (int q = 0; q < n - 2*t; q++) a[n-1-q] = msg[q];
    for (int p = n - 1; p >= 2*t; p--) begin
      c = a[p];
      if (c != 0)
        for (int j = 0; j <= 2*t; j++) a[p-2*t+j] ^= mul(c, g[j]);
    end
    for (int q = 0; q < 255; q++) cw[q] = 0;
    for (int q = 0; q < n; q++) cw[q] = (q < n - 2*t) ? msg[q] : a[n-1-q];
  endfunction

  // S_i = R(alpha^i), returned as s[i-1], i = 1 .. 2t
  function automatic void syndromes(int n, int t, word_t r, output sym8_t s [32]);
    for (int i = 1; i <= 32; i++) begin
      s[i-1] = 0;
      if (i <= 2*t)
        for (int q = 0; q < n; q++)
          s[i-1] ^= mul(r[q], alpha_pow(i * (n - 1 - q)));
    end
  endfunction

  // Lambda(x) = prod (1 + alpha^p x) over error powers p; lam[0] = 1
  function automatic void locator(int ne, int pw [], output sym8_t lam [33]);
    for (int j = 0; j < 33; j++) lam[j] = 0;
    lam[0] = 1;
    for (int e = 0; e < ne; e++)
      for (int j = e + 1; j >= 1; j--)
        lam[j] ^= mul(lam[j-1], alpha_pow(pw[e]));
  endfunction

  // Omega = Lambda * S mod x^2t
  function automatic void evaluator(int t, sym8_t lam [33], sym8_t s [32],
                                    output sym8_t om [32]);
    for (int i = 0; i < 32; i++) begin
      om[i] = 0;
      if (i < 2*t)
        for (int j = 0; j <= i; j++) om[i] ^= mul(lam[j], s[i-j]);
    end
  endfunction

  // Random word with ne errors at distinct positions (transmission index).
  function automatic void add_errors(int n, int ne, ref word_t r, output int pw [16]);
    int q;
    bit used [255];
    for (int i = 0; i < 255; i++) used[i] = 0;
    for (int e = 0; e < 16; e++) pw[e] = 0;
    for (int e = 0; e < ne; e++) begin
      do q = $urandom_range(n - 1); while (used[q]);
      used[q] = 1;
      r[q] ^= sym8_t'($urandom_range(255, 1));
      pw[e] = n - 1 - q;
    end
  endfunction

endpackage
