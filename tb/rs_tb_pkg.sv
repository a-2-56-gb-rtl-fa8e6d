// rs_tb_pkg: reference arithmetic for the decoder testbenches.
//
// Everything here is computed independently of the RTL: GF(2^8) products
// go through log/antilog tables built at run time (the RTL multiplies by
// shift-and-reduce), syndromes are evaluated directly from their
// definition, and Lambda(x) comes from a textbook Berlekamp-Massey with
// inversions.  A systematic RS(255,239) encoder with generator roots
// alpha^1..alpha^16 produces test codewords.  Arrays of symbols are indexed
// by power of x (cw[l] is the coefficient of x^l).
package rs_tb_pkg;

  typedef logic [7:0] sym_t;
  typedef sym_t cw_t [255];
  typedef sym_t syn_t [16];
  typedef sym_t lam_t [9];

  int unsigned exp_t [512];
  int unsigned log_t [256];
  bit          tables_ready = 0;

  function automatic void init_tables();
    int unsigned x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = x;
      log_t[x] = i;
      x = x << 1;
      if ((x & 32'h100) != 0) x = x ^ 32'h11D;
    end
    for (int i = 255; i < 512; i++) exp_t[i] = exp_t[i-255];
    tables_ready = 1;
  endfunction

  function automatic sym_t mul(sym_t a, sym_t b);
    if (!tables_ready) init_tables();
    if (a == 0 || b == 0) return 0;
    return sym_t'(exp_t[log_t[a] + log_t[b]]);
  endfunction

  function automatic sym_t inv(sym_t a);
    if (!tables_ready) init_tables();
    return sym_t'(exp_t[(255 - log_t[a]) % 255]);
  endfunction

  function automatic sym_t apow(int e);
    if (!tables_ready) init_tables();
    return sym_t'(exp_t[((e % 255) + 255) % 255]);
  endfunction

  function automatic syn_t syndromes(cw_t r);
    syn_t s;
    for (int i = 1; i <= 16; i++) begin
      sym_t acc;
      acc = 0;
      for (int l = 0; l < 255; l++)
        if (r[l] != 0) acc ^= mul(r[l], apow(i * l));
      s[i-1] = acc;
    end
    return s;
  endfunction

  // Berlekamp-Massey with inversions; returns Lambda (monic, Lambda_0=1)
  function automatic void bm(syn_t s, output lam_t lam, output int len);
    sym_t c [17], b [17], tt [17];
    sym_t d, bb, coef;
    int   l, m;
    for (int i = 0; i < 17; i++) begin c[i] = 0; b[i] = 0; end
    c[0] = 1; b[0] = 1; l = 0; m = 1; bb = 1;
    for (int n = 0; n < 16; n++) begin
      d = s[n];
      for (int i = 1; i <= l; i++) d ^= mul(c[i], s[n-i]);
      if (d == 0) m++;
      else begin
        coef = mul(d, inv(bb));
        tt = c;
        for (int i = m; i < 17; i++) c[i] ^= mul(coef, b[i-m]);
        if (2*l <= n) begin
          l = n + 1 - l; b = tt; bb = d; m = 1;
        end else m++;
      end
    end
    for (int i = 0; i < 9; i++) lam[i] = c[i];
    len = l;
  endfunction

  // a and b equal up to one non-zero scale factor
  function automatic bit same_up_to_scale(lam_t a, lam_t b);
    sym_t k;
    int   f;
    f = -1;
    for (int i = 0; i < 9; i++) if (a[i] != 0 && f < 0) f = i;
    if (f < 0) begin
      for (int i = 0; i < 9; i++) if (b[i] != 0) return 0;
      return 1;
    end
    if (b[f] == 0) return 0;
    k = mul(b[f], inv(a[f]));
    for (int i = 0; i < 9; i++) if (mul(a[i], k) != b[i]) return 0;
    return 1;
  endfunction

  // systematic encoder: message in cw[254..16], parity in cw[15..0]
  function automatic cw_t encode(cw_t msg);
    sym_t g [17];
    sym_t par [16];
    sym_t fb;
    cw_t  cw;
    for (int i = 0; i < 17; i++) g[i] = 0;
    g[0] = 1;
    for (int r = 1; r <= 16; r++) begin          // g(x) *= (x + alpha^r)
      for (int i = 16; i > 0; i--) g[i] = g[i-1] ^ mul(g[i], apow(r));
      g[0] = mul(g[0], apow(r));
    end
    for (int i = 0; i < 16; i++) par[i] = 0;
    for (int l = 254; l >= 16; l--) begin
      fb = msg[l] ^ par[15];
      for (int i = 15; i > 0; i--) par[i] = par[i-1] ^ mul(fb, g[i]);
      par[0] = mul(fb, g[0]);
    end
    cw = msg;
    for (int i = 0; i < 16; i++) cw[i] = par[i];
    return cw;
  endfunction

  function automatic cw_t random_codeword();
    cw_t m;
    for (int l = 0; l < 255; l++) m[l] = sym_t'($urandom);
    return encode(m);
  endfunction

endpackage
