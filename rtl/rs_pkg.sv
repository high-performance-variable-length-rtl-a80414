// rs_pkg: shared types, constants and GF(2^8) arithmetic for the
// variable-length eight-parallel Reed-Solomon encoder and decoder.
//
// Code: shortened RS(255,239) over GF(2^8), t = 8, 16 parity symbols.
// The field is generated by p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D), the
// polynomial used by the WPAN standards this codec targets; the generator
// polynomial has the 16 consecutive roots alpha^0 .. alpha^15, which matches
// syndromes S_i = R(alpha^i), 0 <= i <= 15, and the Forney form
// Y = omega(X^-1) / (sigma'(X^-1) X^-1) used by the decoder.
//
// A bus word carries eight symbols. Lane 0 ("A") is the first symbol in
// time and sits in the most significant byte, so a word is sym8_t with
// w[0] = lane A = bits [63:56]. code_size is the number of message symbols
// k (1..239); the codeword has n = k + 16 symbols.
//
// Tables (exponent, logarithm, inverse, generator remainders) are computed
// by constant functions at elaboration, so no data file is needed.
package rs_pkg;

  localparam int unsigned SYM_W   = 8;
  localparam int unsigned LANES   = 8;
  localparam int unsigned T_CORR  = 8;                 // correctable errors
  localparam int unsigned NPAR    = 2 * T_CORR;        // parity symbols
  localparam int unsigned N_MAX   = 255;
  localparam int unsigned K_MAX   = N_MAX - NPAR;      // 239
  localparam int unsigned C_MAX   = (K_MAX + LANES - 1) / LANES;  // 30 message words
  localparam int unsigned W_MAX   = C_MAX + NPAR / LANES;         // 32 codeword words
  localparam logic [8:0]  PRIM_POLY = 9'h11D;

  typedef logic [SYM_W-1:0]      gf_t;
  typedef logic [0:LANES-1][7:0] sym8_t;   // [0] = lane A (MSB)
  typedef logic [7:0]            ksize_t;  // code_size (k)
  typedef gf_t                   gf_tab_t [256];
  typedef gf_t                   par_t [NPAR];

  // ---------------- field arithmetic ----------------
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ PRIM_POLY[7:0]) : (aa << 1);
    end
    return p;
  endfunction

  function automatic gf_tab_t gen_exp();
    gf_tab_t e;
    gf_t     x;
    x = 8'h01;
    for (int i = 0; i < 256; i++) begin
      e[i] = x;
      x = gf_mul(x, 8'h02);
    end
    e[255] = 8'h01;
    return e;
  endfunction

  function automatic gf_tab_t gen_log();
    gf_tab_t l;
    gf_t     x;
    l = '{default: 8'h00};
    x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      l[x] = 8'(i);
      x = gf_mul(x, 8'h02);
    end
    return l;
  endfunction

  // 256 x 8 inverse table; inv(0) is defined as 0.
  function automatic gf_tab_t gen_inv();
    gf_tab_t v;
    gf_tab_t e;
    gf_tab_t l;
    e = gen_exp();
    l = gen_log();
    v[0] = 8'h00;
    for (int i = 1; i < 256; i++) v[i] = e[(255 - int'(l[i])) % 255];
    return v;
  endfunction

  localparam gf_tab_t GF_EXP = gen_exp();
  localparam gf_tab_t GF_LOG = gen_log();
  localparam gf_tab_t GF_INV = gen_inv();

  // alpha^e for any non-negative exponent
  function automatic gf_t alpha_pow(int unsigned e);
    return GF_EXP[e % 255];
  endfunction

  // ---------------- generator polynomial ----------------
  // g(x) = prod_{i=0}^{15} (x + alpha^i), monic, coefficients g[0..16]
  typedef gf_t gpoly_t [NPAR+1];
  function automatic gpoly_t gen_gpoly();
    gpoly_t g;
    gf_t    root;
    g = '{default: 8'h00};
    g[0] = 8'h01;
    root = 8'h01;                       // alpha^i, stepped by alpha
    for (int i = 0; i < NPAR; i++) begin
      for (int j = NPAR; j > 0; j--) g[j] = g[j-1] ^ gf_mul(g[j], root);
      g[0] = gf_mul(g[0], root);
      root = gf_mul(root, 8'h02);
    end
    return g;
  endfunction

  // Partial generator polynomials G_j = x^(16+j) mod g(x), j = 0..7,
  // coefficient c of G_j is GREM[j][c].
  typedef logic [0:LANES-1][0:NPAR-1][7:0] grem_t;
  function automatic grem_t gen_grem();
    grem_t  r;
    gpoly_t g;
    logic [0:NPAR-1][7:0] cur;
    gf_t    fb;
    g = gen_gpoly();
    cur = '0;
    // x^16 mod g = sum_{c<16} g[c] x^c (characteristic 2)
    for (int c = 0; c < NPAR; c++) cur[c] = g[c];
    for (int j = 0; j < LANES; j++) begin
      r[j] = cur;
      fb = cur[NPAR-1];
      for (int c = NPAR - 1; c > 0; c--) cur[c] = cur[c-1] ^ gf_mul(fb, g[c]);
      cur[0] = gf_mul(fb, g[0]);
    end
    return r;
  endfunction

  localparam grem_t GREM = gen_grem();

  // ---------------- key equation solver state ----------------
  // Polynomials of degree <= 16, coefficient i = x^i.
  typedef logic [NPAR:0][7:0] poly_t;

  typedef struct packed {
    logic   valid;
    ksize_t k;       // code_size tag travelling with the codeword
    poly_t  r;       // remainder R(x),  lam * S = R mod x^16
    poly_t  q;       // remainder Q(x),  mu  * S = Q mod x^16
    poly_t  lam;
    poly_t  mu;
  } kes_state_t;

  // degree of a polynomial, -1 for the zero polynomial
  function automatic int poly_deg(poly_t p);
    int d;
    d = -1;
    for (int i = 0; i <= NPAR; i++) if (p[i] != 8'h00) d = i;
    return d;
  endfunction

  // ---------------- code-size helpers ----------------
  // number of message words c = ceil(k/8)
  function automatic logic [5:0] msg_words(ksize_t k);
    return 6'((int'(k) + LANES - 1) / LANES);
  endfunction

  // number of leading zero symbols the permutation inserts, (8 - k mod 8) mod 8
  function automatic logic [2:0] pad_zeros(ksize_t k);
    return 3'((LANES - (int'(k) % LANES)) % LANES);
  endfunction

endpackage
