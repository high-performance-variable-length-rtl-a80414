// rs_kes: key equation solver, sigma(x) S(x) = omega(x) mod x^16.
//
// Syndromes arrive serially (8 bits per clock, S0 first) from the syndrome
// block and are collected into S(x) = S0 + S1 x + ... + S15 x^15. On the
// clock S15 arrives the solver state R = x^16, Q = S(x), lam = 0, mu = 1
// enters a systolic chain of 16 three-stage processing elements
// (rs_kes_pe), so sigma(x) and omega(x) leave the chain 48 clocks later. The
// chain is fully pipelined: a new syndrome set may enter every clock, and in
// the decoder one arrives at most every 16 clocks.
//
// At the end of the chain the pair whose remainder has degree below t is
// chosen: omega(x) is that remainder (degree <= 7) and sigma(x) its
// multiplier (degree <= 8). Both carry the same unknown scale factor, which
// cancels in the Forney ratio and does not move the roots.
//
// Interface: syn/syn_valid/syn_first/syn_k from rs_syndrome; sigma[0..8],
// omega[0..7], kes_valid (one clock) and kes_k (code_size tag) to the error
// correction block. Timing: kes_valid is high 48 clocks after the clock
// that carries S15. `overrun` pulses if a new S0 arrives before the previous
// set was complete.
//
// From the document: serial syndrome input, three-stage pipelining and the
// 48-clock latency. The iteration itself is this design's (see rs_kes_pe).
module rs_kes
  import rs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  gf_t    syn,
  input  logic   syn_valid,
  input  logic   syn_first,
  input  ksize_t syn_k,
  output gf_t    sigma [T_CORR+1],
  output gf_t    omega [T_CORR],
  output logic   kes_valid,
  output ksize_t kes_k,
  output logic   overrun
);

  // ---------------- serial-to-parallel syndrome collection ----------------
  gf_t        sv_q [NPAR-1];
  logic [4:0] idx_q;
  kes_state_t init;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q   <= '0;
      overrun <= 1'b0;
      for (int i = 0; i < NPAR - 1; i++) sv_q[i] <= 8'h00;
    end else begin
      overrun <= syn_valid && syn_first && (idx_q != 0);
      if (syn_valid) begin
        if (syn_first) begin
          sv_q[0] <= syn;
          idx_q   <= 5'd1;
        end else if (idx_q == 5'(NPAR - 1)) begin
          idx_q <= '0;
        end else begin
          sv_q[idx_q[3:0]] <= syn;
          idx_q <= idx_q + 5'd1;
        end
      end
    end
  end

  always_comb begin
    init       = '0;
    init.valid = syn_valid && !syn_first && (idx_q == 5'(NPAR - 1));
    init.k     = syn_k;
    init.r[NPAR] = 8'h01;
    for (int i = 0; i < NPAR - 1; i++) init.q[i] = sv_q[i];
    init.q[NPAR-1] = syn;
    init.mu[0]     = 8'h01;
  end

  // ---------------- systolic chain of 2t elements ----------------
  kes_state_t chain [NPAR+1];
  assign chain[0] = init;

  for (genvar g = 0; g < NPAR; g++) begin : g_pe
    rs_kes_pe u_pe (.clk, .rst_n, .din(chain[g]), .dout(chain[g+1]));
  end

  // ---------------- result selection ----------------
  kes_state_t fin;
  logic       take_r;
  assign fin    = chain[NPAR];
  assign take_r = poly_deg(fin.r) < int'(T_CORR);

  always_comb begin
    for (int i = 0; i <= T_CORR; i++) sigma[i] = take_r ? fin.lam[i] : fin.mu[i];
    for (int i = 0; i < T_CORR; i++)  omega[i] = take_r ? fin.r[i]   : fin.q[i];
  end
  assign kes_valid = fin.valid;
  assign kes_k     = fin.k;

endmodule
