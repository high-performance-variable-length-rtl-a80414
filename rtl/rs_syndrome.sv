// rs_syndrome: variable-length eight-parallel syndrome computation.
//
// Computes S_i = R(alpha^i), 0 <= i <= 15, of a received codeword of
// n = k + 16 symbols. The codeword is first re-aligned by rs_permute (leading
// zero padding decided by code_size), then each clock every syndrome cell
// does S_i <- S_i * (alpha^i)^8 + sum_l r_l (alpha^i)^(7-l), with lane A
// carrying the highest power (Horner's rule eight symbols at a time). On the
// first word the feedback is replaced by zero (multiplexer (3) of the
// syndrome figure); after the last word the sixteen results are loaded into
// an output shift register (multiplexer (4)) and shifted out serially, S0
// first, one per clock, so that the cells are free for the next codeword.
//
// Interface: `start` with the first of ceil(k/8) + 2 consecutive codeword
// words, code_size = k on that cycle. Output: syn/syn_valid for 16 cycles,
// syn_first with S0, syn_k carries code_size with the syndromes.
// Timing: with the first word in cycle 0, S0 appears in cycle W + 1 and S15
// in cycle W + 16, W = ceil(k/8) + 2. A codeword whose syndromes would be
// loaded while the previous ones are still shifting out raises `overrun` for
// one clock (the source must respect the wait time).
//
// From the document: the parallel Horner structure, muxes (3)/(4), serial
// S0..S15 output and the permutation. This design's choices: roots
// alpha^0..alpha^15 (see rs_pkg) and the framing signals.
module rs_syndrome
  import rs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  ksize_t code_size,
  input  sym8_t  din,
  output gf_t    syn,
  output logic   syn_valid,
  output logic   syn_first,
  output ksize_t syn_k,
  output logic   overrun
);

  sym8_t pw;
  logic  pw_valid, pw_first, pw_last;

  rs_permute #(.EXTRA_WORDS(NPAR / LANES)) u_perm (
    .clk, .rst_n, .start, .code_size, .din,
    .pw, .pw_valid, .pw_first, .pw_last
  );

  // code_size of the codeword in the cells
  ksize_t k_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     k_q <= '0;
    else if (start) k_q <= code_size;
  end

  // ---------------- syndrome cells, flip-flop (1) ----------------
  par_t acc_q, acc_d;

  always_comb begin
    for (int i = 0; i < NPAR; i++) begin
      gf_t a;
      a = pw_first ? 8'h00 : gf_mul(acc_q[i], alpha_pow(LANES * i));
      for (int l = 0; l < LANES; l++) a ^= gf_mul(pw[l], alpha_pow(i * (LANES - 1 - l)));
      acc_d[i] = a;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc_q <= '{default: 8'h00};
    else if (pw_valid) acc_q <= acc_d;
  end

  // ---------------- serial output shift register S0..S15 ----------------
  // Multiplexer (4): the finished syndromes are loaded in parallel, then
  // shifted towards S0, whose register drives the output directly.
  par_t       sh_q;
  logic [4:0] cnt_q;     // syndromes still to shift out

  assign syn       = sh_q[0];
  assign syn_valid = (cnt_q != 0);
  assign syn_first = (cnt_q == 5'(NPAR));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q    <= '{default: 8'h00};
      cnt_q   <= '0;
      syn_k   <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= pw_valid && pw_last && (cnt_q > 5'd1);
      if (pw_valid && pw_last) begin
        sh_q  <= acc_d;
        cnt_q <= 5'(NPAR);
        syn_k <= k_q;
      end else if (cnt_q != 0) begin
        for (int i = 0; i < NPAR - 1; i++) sh_q[i] <= sh_q[i+1];
        sh_q[NPAR-1] <= 8'h00;
        cnt_q <= cnt_q - 5'd1;
      end
    end
  end

endmodule
