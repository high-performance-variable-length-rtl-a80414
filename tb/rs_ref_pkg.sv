// rs_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL package. GF(2^8) with p(x) = x^8+x^4+x^3+x^2+1 is built from
// log/antilog tables; the encoder reference is plain symbol-serial long
// division by g(x) = prod_{i=0}^{15} (x + alpha^i). Codewords are arrays of
// symbols in transmission order (index 0 = highest degree).
package rs_ref_pkg;

  typedef byte unsigned u8;

  u8  exp_t [0:511];
  int log_t [0:255];
  bit ready = 0;

  function automatic void init();
    int x;
    if (ready) return;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = u8'(x);
      exp_t[i + 255] = u8'(x);
      log_t[x] = i;
      x = x << 1;
      if ((x & 'h100) != 0) x = x ^ 'h11D;
    end
    exp_t[510] = exp_t[0];
    exp_t[511] = exp_t[1];
    log_t[0] = -1;
    ready = 1;
  endfunction

  function automatic u8 mul(u8 a, u8 b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic u8 inv(u8 a);
    return exp_t[(255 - log_t[a]) % 255];
  endfunction

  function automatic u8 apow(int e);
    e = e % 255;
    if (e < 0) e += 255;
    return exp_t[e];
  endfunction

  // generator polynomial, g[0..16], g[16] = 1
  function automatic void gpoly(output u8 g [0:16]);
    for (int j = 0; j <= 16; j++) g[j] = 0;
    g[0] = 1;
    for (int i = 0; i < 16; i++)
      for (int j = 16; j >= 0; j--)
        g[j] = mul(g[j], apow(i)) ^ ((j > 0) ? g[j-1] : 8'd0);
  endfunction

  // systematic encoding: cw[0..k-1] = msg, cw[k..k+15] = parity (P0 first)
  function automatic void encode(input u8 msg [], input int k, output u8 cw []);
    u8 g [0:16];
    u8 r [0:15];   // r[15] is the highest-degree remainder coefficient
    u8 fb;
    gpoly(g);
    for (int i = 0; i < 16; i++) r[i] = 0;
    for (int s = 0; s < k; s++) begin
      fb = msg[s] ^ r[15];
      for (int i = 15; i > 0; i--) r[i] = r[i-1] ^ mul(fb, g[i]);
      r[0] = mul(fb, g[0]);
    end
    cw = new[k + 16];
    for (int s = 0; s < k; s++) cw[s] = msg[s];
    for (int p = 0; p < 16; p++) cw[k + p] = r[15 - p];
  endfunction

  // S_i = R(alpha^i), R in transmission order
  function automatic u8 syndrome(input u8 cw [], input int n, input int i);
    u8 acc;
    acc = 0;
    for (int s = 0; s < n; s++) acc = mul(acc, apow(i)) ^ cw[s];
    return acc;
  endfunction

  // evaluate a polynomial (coefficient i of x^i) at x
  function automatic u8 peval(input u8 p [], input u8 x);
    u8 acc;
    acc = 0;
    for (int i = p.size() - 1; i >= 0; i--) acc = mul(acc, x) ^ p[i];
    return acc;
  endfunction

  // error locator sigma(x) = prod (1 + alpha^d x) for error degrees d
  function automatic void locator(input int degs [], output u8 sig []);
    sig = new[9];
    foreach (sig[i]) sig[i] = 0;
    sig[0] = 1;
    foreach (degs[e])
      for (int i = 8; i > 0; i--) sig[i] = sig[i] ^ mul(sig[i-1], apow(degs[e]));
  endfunction

  // syndromes of an error pattern: S_i = sum Y alpha^(d i)
  function automatic void err_syndromes(input int degs [], input u8 vals [], output u8 syn []);
    syn = new[16];
    for (int i = 0; i < 16; i++) begin
      syn[i] = 0;
      foreach (degs[e]) syn[i] ^= mul(vals[e], apow(degs[e] * i));
    end
  endfunction

  // product coefficient j of a(x) b(x)
  function automatic u8 pmul_coef(input u8 a [], input u8 b [], input int j);
    u8 acc;
    acc = 0;
    for (int i = 0; i <= j; i++)
      if (i < a.size() && j - i < b.size()) acc ^= mul(a[i], b[j - i]);
    return acc;
  endfunction

endpackage
