// rs_kes_pe: one processing element of the key equation solver, i.e. one
// iteration of the modified Euclidean algorithm, pipelined in three stages.
//
// The element holds two remainder/multiplier pairs (R, lam) and (Q, mu) with
// the invariant lam*S = R and mu*S = Q (mod x^16). One iteration cancels the
// leading term of the higher-degree remainder:
//   stage 1: find deg R and deg Q; if either is already below t = 8 the
//            codeword is finished and passes unchanged; otherwise swap the
//            pairs so that deg R >= deg Q and note l = deg R - deg Q and the
//            leading coefficients a = lead(R), b = lead(Q);
//   stage 2: form b*R, a*x^l*Q, b*lam and a*x^l*mu;
//   stage 3: R <- b*R + a*x^l*Q, lam <- b*lam + a*x^l*mu.
// Each stage ends in a register, so the element has three clocks of latency
// and accepts a new codeword state every clock. Sixteen of them in a row
// (2t iterations, always enough) make the 48-clock solver.
//
// The document takes its solver from earlier work and gives only its
// function, pipelining and latency; this element is the textbook modified
// Euclidean step with explicit degree computation, chosen as the simplest
// iteration that meets that function and timing.
module rs_kes_pe
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  kes_state_t din,
  output kes_state_t dout
);

  typedef struct packed {
    kes_state_t st;
    logic       done;
    logic [4:0] l;
    gf_t        a;
    gf_t        b;
  } s1_t;

  typedef struct packed {
    kes_state_t st;   // r and lam replaced by b*R and b*lam
    logic       done;
    poly_t      aq;   // a * x^l * Q
    poly_t      amu;  // a * x^l * mu
  } s2_t;

  s1_t        s1_d, s1_q;
  s2_t        s2_d, s2_q;
  kes_state_t s3_d;

  // ---------------- stage 1: degrees, swap, leading terms ----------------
  always_comb begin
    int dr, dq;
    s1_d = '0;
    dr = poly_deg(din.r);
    dq = poly_deg(din.q);
    s1_d.st   = din;
    s1_d.done = (dr < int'(T_CORR)) || (dq < int'(T_CORR));
    if (!s1_d.done) begin
      if (dr < dq) begin
        s1_d.st.r   = din.q;
        s1_d.st.q   = din.r;
        s1_d.st.lam = din.mu;
        s1_d.st.mu  = din.lam;
        s1_d.l = 5'(dq - dr);
        s1_d.a = din.q[dq];
        s1_d.b = din.r[dr];
      end else begin
        s1_d.l = 5'(dr - dq);
        s1_d.a = din.r[dr];
        s1_d.b = din.q[dq];
      end
    end
  end

  // ---------------- stage 2: scaling and alignment ----------------
  always_comb begin
    poly_t qs, ms;
    s2_d      = '0;
    s2_d.st   = s1_q.st;
    s2_d.done = s1_q.done;
    qs = s1_q.st.q  << (8 * s1_q.l);
    ms = s1_q.st.mu << (8 * s1_q.l);
    if (!s1_q.done) begin
      for (int i = 0; i <= NPAR; i++) begin
        s2_d.st.r[i]   = gf_mul(s1_q.b, s1_q.st.r[i]);
        s2_d.st.lam[i] = gf_mul(s1_q.b, s1_q.st.lam[i]);
        s2_d.aq[i]     = gf_mul(s1_q.a, qs[i]);
        s2_d.amu[i]    = gf_mul(s1_q.a, ms[i]);
      end
    end
  end

  // ---------------- stage 3: cancellation ----------------
  always_comb begin
    s3_d = s2_q.st;
    if (!s2_q.done) begin
      s3_d.r   = s2_q.st.r ^ s2_q.aq;
      s3_d.lam = s2_q.st.lam ^ s2_q.amu;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      dout <= '0;
    end else begin
      s1_q <= s1_d;
      s2_q <= s2_d;
      dout <= s3_d;
    end
  end

endmodule
