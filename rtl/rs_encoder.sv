// rs_encoder: variable-length eight-parallel systematic RS encoder
// (shortened RS(255,239), t = 8).
//
// Parity is p(x) = x^16 m(x) mod g(x), computed eight symbols per clock.
// The message is first re-aligned by rs_permute so that its first word is
// zero-padded at the front; then each clock the 16-symbol remainder D0..D15
// is shifted by x^8 and the eight feedback symbols u_j = D(8+j) + m(7-j) are
// multiplied by the partial generator polynomials G_j = x^(16+j) mod g(x)
// and added in, as in the encoder figure (eq. 3/4 of the method). After the
// last message word the remainder is copied to a parity register.
//
// Interface: pulse `start` with the first message word and give code_size = k
// (1..239) on that cycle. Message words must follow on consecutive cycles,
// ceil(k/8) of them, last word zero-filled at the end. The codeword occupies
// ceil((k+16)/8) word slots, so the next `start` may come that many cycles
// after this one (two idle slots after the message carry the parity).
//
// Output: the systematic codeword, message symbols in input order followed
// directly by the 16 parity symbols P0..P15 (P0 = coefficient of x^15),
// packed eight per word and zero-filled after the last parity symbol.
// Latency is three clocks: input word w appears as output word w three
// cycles later; dout_valid/dout_sop/dout_eop frame the codeword.
//
// From the document: eight-parallel partial generator structure,
// permutation by code_size, three-clock latency and the output packing of the
// encoder timing chart. This design's choices: the start/valid framing, the
// field polynomial and g(x) roots (see rs_pkg).
module rs_encoder
  import rs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,       // RSEST
  input  ksize_t code_size,   // k
  input  sym8_t  din,         // UCWD_A..H
  output sym8_t  dout,        // ECWD_A..H
  output logic   dout_valid,
  output logic   dout_sop,
  output logic   dout_eop
);

  // ---------------- permutation ----------------
  sym8_t pw;
  logic  pw_valid, pw_first, pw_last;

  rs_permute #(.EXTRA_WORDS(0)) u_perm (
    .clk, .rst_n, .start, .code_size, .din,
    .pw, .pw_valid, .pw_first, .pw_last
  );

  // ---------------- parity remainder (D0..D15) ----------------
  par_t rem_q, rem_d, par_q;

  always_comb begin
    par_t base;
    gf_t  u [LANES];
    base = pw_first ? '{default: 8'h00} : rem_q;
    for (int j = 0; j < LANES; j++) u[j] = base[LANES + j] ^ pw[LANES - 1 - j];
    for (int i = 0; i < NPAR; i++) begin
      gf_t acc;
      acc = (i >= LANES) ? base[i - LANES] : 8'h00;
      for (int j = 0; j < LANES; j++) acc ^= gf_mul(u[j], GREM[j][i]);
      rem_d[i] = acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '{default: 8'h00};
      par_q <= '{default: 8'h00};
    end else if (pw_valid) begin
      rem_q <= rem_d;
      if (pw_last) par_q <= rem_d;
    end
  end

  // ---------------- systematic output assembly ----------------
  sym8_t      d1_q, d2_q;
  logic       st1_q, st2_q;
  ksize_t     k1_q, k2_q, ok_q;
  logic       obusy_q;
  logic [5:0] ow_q, olast_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_q <= '0; d2_q <= '0;
      st1_q <= 1'b0; st2_q <= 1'b0;
      k1_q <= '0; k2_q <= '0;
    end else begin
      d1_q  <= din;   d2_q  <= d1_q;
      st1_q <= start; st2_q <= st1_q;
      k1_q  <= code_size; k2_q <= k1_q;
    end
  end

  logic       o_act;
  ksize_t     o_k;
  logic [5:0] o_w, o_last;
  sym8_t      o_word;

  assign o_act  = st2_q || obusy_q;
  assign o_k    = st2_q ? k2_q : ok_q;
  assign o_w    = st2_q ? 6'd0 : ow_q;
  assign o_last = st2_q ? (msg_words(k2_q) + 6'd1) : olast_q;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      int s;
      s = LANES * int'(o_w) + l;
      if (s < int'(o_k))             o_word[l] = d2_q[l];
      else if (s < int'(o_k) + NPAR) o_word[l] = par_q[NPAR - 1 - (s - int'(o_k))];
      else                           o_word[l] = 8'h00;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      obusy_q    <= 1'b0;
      ow_q       <= '0;
      olast_q    <= '0;
      ok_q       <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      dout_sop   <= 1'b0;
      dout_eop   <= 1'b0;
    end else begin
      dout_valid <= o_act;
      dout_sop   <= st2_q;
      dout_eop   <= o_act && (o_w == o_last);
      dout       <= o_act ? o_word : '0;
      if (o_act) begin
        ok_q    <= o_k;
        olast_q <= o_last;
        ow_q    <= o_w + 6'd1;
        obusy_q <= (o_w != o_last);
      end
    end
  end

endmodule
