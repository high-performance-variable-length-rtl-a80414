// rs_chien_forney: variable-length eight-parallel Chien search, Forney error
// evaluation and error correction.
//
// For every received symbol at degree d (natural position s = n-1-d) the
// block evaluates beta = alpha^(255-d) in sigma(x), sigma_odd(x) and omega(x);
// sigma(beta) = 0 marks an error whose value is
//   Y = omega(beta) / sigma_odd(beta),  sigma_odd(x) = x sigma'(x),
// which is eq. (13) in characteristic 2. Eight symbols are handled per clock.
// Each coefficient has one cell per lane (the error-correction cell): on the
// first clock the cell loads coef_i * beta0_l^i, where beta0_l^i comes from a
// code_size-indexed first-root table (beta0_l = alpha^(256-n+l), so for
// RS(240,224) the first roots are alpha^16..alpha^23), and on every later clock
// it is multiplied by the constant (alpha^8)^i, reaching alpha^248..alpha^255
// on the last word. Working in the natural symbol order means the corrected
// word needs no inverse permutation.
//
// Pipeline after kes_valid (cycle T): cells hold word w in cycle T+1+w;
// sums registered (T+2+w); zero detect, 256x8 inverse table lookup (T+3+w);
// error value (T+4+w); corrected word = received word (from the FIFO) + error
// value, registered, in cycle T+5+w. fifo_k names the code_size of the word
// that is being corrected in cycle T+4+w so that the FIFO can select its tap.
//
// Error count and failure: the roots found inside the codeword are counted;
// errcnt and fail are valid with dout_eop. fail is raised when the number of
// roots differs from deg sigma (more than t = 8 errors, or a locator with
// roots outside the codeword). Symbols past the end of the codeword (zero
// fill in the last word) are never corrected.
//
// From the document: parallel cells with first-root tables and (alpha^8)^i
// update, sigma_odd feeding the inverse table, zero detection, the correction
// adder with the FIFO output. This design's choices: the exact register
// placement, the 4-bit error count and the failure rule.
module rs_chien_forney
  import rs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  gf_t    sigma [T_CORR+1],
  input  gf_t    omega [T_CORR],
  input  logic   kes_valid,
  input  ksize_t kes_k,
  output ksize_t fifo_k,      // code_size for the FIFO tap
  input  sym8_t  rx,          // received word from the FIFO
  output sym8_t  dout,        // CCWD_A..H
  output logic   dout_valid,
  output logic   dout_sop,
  output logic   dout_eop,
  output logic [3:0] errcnt,  // ERRCNT, valid with dout_eop
  output logic   fail,        // FAIL,   valid with dout_eop
  output logic   overrun
);

  typedef struct packed {
    logic       valid;
    logic       sop;
    logic       eop;
    ksize_t     k;
    logic [5:0] w;
    logic [3:0] sdeg;   // degree of sigma of this codeword
  } tag_t;

  // ---------------- controller #3 and cells ----------------
  gf_t        cs_q [T_CORR+1][LANES];
  gf_t        cw_q [T_CORR][LANES];
  logic       busy_q;
  logic [5:0] w_q, wlast_q;
  ksize_t     k_q;
  logic [3:0] sdeg_q;
  tag_t       t0_q;

  function automatic logic [3:0] sigma_deg(gf_t s [T_CORR+1]);
    logic [3:0] d;
    d = '0;
    for (int i = 0; i <= T_CORR; i++) if (s[i] != 8'h00) d = 4'(i);
    return d;
  endfunction

  function automatic int unsigned first_exp(ksize_t k, int l);
    // beta0_l = alpha^(256 - n + l), n = k + 16
    return unsigned'((256 - (int'(k) + int'(NPAR)) + l) % 255);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      w_q     <= '0;
      wlast_q <= '0;
      k_q     <= '0;
      sdeg_q  <= '0;
      t0_q    <= '0;
      overrun <= 1'b0;
      for (int i = 0; i <= T_CORR; i++)
        for (int l = 0; l < LANES; l++) cs_q[i][l] <= 8'h00;
      for (int i = 0; i < T_CORR; i++)
        for (int l = 0; l < LANES; l++) cw_q[i][l] <= 8'h00;
    end else begin
      overrun <= kes_valid && busy_q && (w_q != wlast_q);
      if (kes_valid) begin
        // general multipliers with the first-root tables
        for (int i = 0; i <= T_CORR; i++)
          for (int l = 0; l < LANES; l++)
            cs_q[i][l] <= gf_mul(sigma[i], alpha_pow(first_exp(kes_k, l) * unsigned'(i)));
        for (int i = 0; i < T_CORR; i++)
          for (int l = 0; l < LANES; l++)
            cw_q[i][l] <= gf_mul(omega[i], alpha_pow(first_exp(kes_k, l) * unsigned'(i)));
        sdeg_q  <= sigma_deg(sigma);
        busy_q  <= 1'b1;
        w_q     <= '0;
        wlast_q <= msg_words(kes_k) + 6'(NPAR / LANES) - 6'd1;
        k_q     <= kes_k;
        t0_q    <= '{valid: 1'b1, sop: 1'b1,
                     eop: (msg_words(kes_k) + 6'(NPAR / LANES) == 6'd1),
                     k: kes_k, w: 6'd0, sdeg: sigma_deg(sigma)};
      end else if (busy_q && (w_q != wlast_q)) begin
        // constant multipliers (alpha^8)^i
        for (int i = 0; i <= T_CORR; i++)
          for (int l = 0; l < LANES; l++)
            cs_q[i][l] <= gf_mul(cs_q[i][l], alpha_pow(LANES * unsigned'(i)));
        for (int i = 0; i < T_CORR; i++)
          for (int l = 0; l < LANES; l++)
            cw_q[i][l] <= gf_mul(cw_q[i][l], alpha_pow(LANES * unsigned'(i)));
        w_q  <= w_q + 6'd1;
        t0_q <= '{valid: 1'b1, sop: 1'b0, eop: (w_q + 6'd1 == wlast_q),
                  k: k_q, w: w_q + 6'd1, sdeg: sdeg_q};
      end else begin
        busy_q <= 1'b0;
        t0_q   <= '0;
      end
    end
  end

  // ---------------- stage 1: polynomial sums ----------------
  gf_t  sv_d [LANES], so_d [LANES], ov_d [LANES];
  gf_t  sv_q [LANES], so_q [LANES], ov_q [LANES];
  tag_t t1_q;

  // sigma(beta), sigma_odd(beta) and omega(beta) per lane
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      gf_t se, so, ov;
      se = 8'h00; so = 8'h00; ov = 8'h00;
      for (int i = 0; i <= T_CORR; i++)
        if (i % 2 == 1) so ^= cs_q[i][l];
        else            se ^= cs_q[i][l];
      for (int i = 0; i < T_CORR; i++) ov ^= cw_q[i][l];
      sv_d[l] = se ^ so;
      so_d[l] = so;
      ov_d[l] = ov;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_q <= '0;
      for (int l = 0; l < LANES; l++) begin
        sv_q[l] <= 8'h00; so_q[l] <= 8'h00; ov_q[l] <= 8'h00;
      end
    end else begin
      t1_q <= t0_q;
      sv_q <= sv_d;
      so_q <= so_d;
      ov_q <= ov_d;
    end
  end

  // ---------------- stage 2: zero detect, inverse table ----------------
  logic [LANES-1:0] hit2_q;
  gf_t  inv2_q [LANES], ov2_q [LANES];
  tag_t t2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t2_q    <= '0;
      hit2_q  <= '0;
      for (int l = 0; l < LANES; l++) begin
        inv2_q[l] <= 8'h00; ov2_q[l] <= 8'h00;
      end
    end else begin
      t2_q    <= t1_q;
      for (int l = 0; l < LANES; l++) begin
        // only symbols inside the codeword (position s < n) can be in error
        hit2_q[l] <= t1_q.valid && (sv_q[l] == 8'h00) &&
                     (LANES * int'(t1_q.w) + l < int'(t1_q.k) + int'(NPAR));
        inv2_q[l] <= GF_INV[so_q[l]];
        ov2_q[l]  <= ov_q[l];
      end
    end
  end

  // ---------------- stage 3: error values and root count ----------------
  sym8_t      ev3_q;
  tag_t       t3_q;
  logic [3:0] cnt_q, cnt3_q, cnt_d;

  assign fifo_k = t3_q.k;

  // running count of roots inside the codeword, saturating at 15
  always_comb begin
    cnt_d = t2_q.sop ? 4'd0 : cnt_q;
    for (int l = 0; l < LANES; l++)
      if (hit2_q[l] && cnt_d != 4'd15) cnt_d = cnt_d + 4'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t3_q   <= '0;
      ev3_q  <= '0;
      cnt_q  <= '0;
      cnt3_q <= '0;
    end else begin
      t3_q <= t2_q;
      for (int l = 0; l < LANES; l++)
        ev3_q[l] <= hit2_q[l] ? gf_mul(ov2_q[l], inv2_q[l]) : 8'h00;
      if (t2_q.valid) cnt_q <= cnt_d;
      cnt3_q <= cnt_d;
    end
  end

  // ---------------- stage 4: correction ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      dout_sop   <= 1'b0;
      dout_eop   <= 1'b0;
      errcnt     <= '0;
      fail       <= 1'b0;
    end else begin
      dout_valid <= t3_q.valid;
      dout_sop   <= t3_q.sop;
      dout_eop   <= t3_q.eop;
      dout       <= t3_q.valid ? (rx ^ ev3_q) : '0;
      if (t3_q.valid && t3_q.eop) begin
        errcnt <= cnt3_q;
        fail   <= (cnt3_q != t3_q.sdeg);
      end else begin
        errcnt <= '0;
        fail   <= 1'b0;
      end
    end
  end

endmodule
