// tb_rs_pkg: reference arithmetic for the Reed-Solomon testbenches.
//
// Written independently of the RTL: multiplication goes through
// exponent/logarithm tables that are built at time zero from the primitive
// polynomial 0x11D, encoding is the systematic long division of m(x)*x^2T
// by g(x) = prod_{j=0}^{2T-1} (x + alpha^(FCR+j)), and syndromes are the
// direct sums sum_k c_k alpha^((FCR+j)k). Words are held highest degree
// first: w[0] is the coefficient of x^(n-1).
package tb_rs_pkg;

  typedef logic [7:0] sym_t;
  typedef sym_t word_t[];

  sym_t exp_t [512];
  int   log_t [256];

  function automatic void tables_init();
    int v;
    v = 1;
    for (int i = 0; i < 512; i++) begin
      exp_t[i] = sym_t'(v);
      if (i < 255) log_t[v] = i;
      v = v << 1;
      if (v & 256) v = v ^ 'h11D;
    end
    log_t[0] = -1;
  endfunction

  function automatic sym_t mul(sym_t a, sym_t b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic sym_t apow(int e);
    e = e % 255;
    if (e < 0) e += 255;
    return exp_t[e];
  endfunction

  // generator polynomial, g[0] = coefficient of x^0
  function automatic word_t gen_poly(int r, int fcr);
    word_t g;
    g = new[r + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int j = 0; j < r; j++) begin
      // g <- g * (x + alpha^(fcr+j))
      for (int i = r; i >= 0; i--)
        g[i] = (i > 0 ? g[i-1] : 8'h00) ^ mul(g[i], apow(fcr + j));
    end
    return g;
  endfunction

  // systematic encoding: msg has k symbols, result n = k + r symbols
  function automatic word_t encode(word_t msg, int r, int fcr);
    word_t g, rem, cw;
    sym_t  fb;
    int k;
    k = msg.size();
    g = gen_poly(r, fcr);
    rem = new[r];
    foreach (rem[i]) rem[i] = 0;     // rem[i] = coefficient of x^i
    for (int i = 0; i < k; i++) begin
      fb = msg[i] ^ rem[r-1];
      for (int j = r - 1; j > 0; j--) rem[j] = rem[j-1] ^ mul(fb, g[j]);
      rem[0] = mul(fb, g[0]);
    end
    cw = new[k + r];
    for (int i = 0; i < k; i++) cw[i] = msg[i];
    for (int j = 0; j < r; j++) cw[k + j] = rem[r - 1 - j];
    return cw;
  endfunction

  // S_j = w(alpha^(fcr+j)), direct sum over the coefficients
  function automatic sym_t syndrome(word_t w, int j, int fcr);
    sym_t s;
    int n;
    n = w.size();
    s = 0;
    for (int p = 0; p < n; p++)
      s ^= mul(w[n - 1 - p], apow((fcr + j) * p));
    return s;
  endfunction

  function automatic word_t random_word(int n);
    word_t w;
    w = new[n];
    foreach (w[i]) w[i] = sym_t'($urandom_range(0, 255));
    return w;
  endfunction

  // flip nerr distinct symbols with non-zero error values
  function automatic word_t add_errors(word_t cw, int nerr);
    word_t r;
    int pos;
    bit used[];
    r = new[cw.size()](cw);
    used = new[cw.size()];
    for (int e = 0; e < nerr; e++) begin
      do pos = $urandom_range(0, cw.size() - 1); while (used[pos]);
      used[pos] = 1;
      r[pos] = r[pos] ^ sym_t'($urandom_range(1, 255));
    end
    return r;
  endfunction

endpackage
