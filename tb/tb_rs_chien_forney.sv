// tb_rs_chien_forney: the testbench plays the key equation solver. For a
// random error pattern it forms sigma(x) = prod (1 + X x) and
// omega(x) = sigma(x) S(x) mod x^8 with its own arithmetic and hands them to
// the block with rx = 0, so the corrected output equals the error pattern:
// every symbol must carry exactly the injected error value, in natural order,
// five clocks after kes_valid. Some codewords get a random degree-8 locator
// instead; errcnt must then equal the roots a reference search finds inside
// the codeword, and fail must be set when that differs from deg sigma.
module tb_rs_chien_forney;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int NCW = 40;

  logic   clk = 0, rst_n = 0;
  gf_t    sigma [T_CORR+1];
  gf_t    omega [T_CORR];
  logic   kes_valid = 0;
  ksize_t kes_k = 0, fifo_k;
  sym8_t  rx = '0;
  sym8_t  dout;
  logic   dout_valid, dout_sop, dout_eop, fail, overrun;
  logic [3:0] errcnt;

  rs_chien_forney dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  ks [NCW];
  bit  rnd [NCW];          // random locator instead of a real pattern
  u8   sig [NCW][];
  u8   om [NCW][];
  u8   ev [NCW][];         // expected error value per natural position
  int  roots [NCW];
  longint st [NCW];
  int  oi = 0, ow = 0;
  int  m_fail = 0;

  function automatic int cwords(int k); return (k + 16 + 7) / 8; endfunction

  always @(posedge clk) begin
    if (rst_n && dout_valid && oi < NCW) begin
      int n;
      n = ks[oi] + 16;
      if (ow == 0) check(dout_sop && cyc - st[oi] == 5, $sformatf("cw %0d latency", oi));
      if (!rnd[oi])
        for (int l = 0; l < 8; l++) begin
          int s;
          s = 8 * ow + l;
          check(dout[l] == ((s < n) ? ev[oi][s] : 8'h00), $sformatf("cw %0d (k=%0d) pos %0d", oi, ks[oi], s));
        end
      if (dout_eop) begin
        int d;
        d = 0;
        foreach (sig[oi][i]) if (sig[oi][i] != 0) d = i;
        check(ow == cwords(ks[oi]) - 1, "eop position");
        check(errcnt == 4'(roots[oi]), $sformatf("cw %0d errcnt %0d vs %0d", oi, errcnt, roots[oi]));
        check(fail == (roots[oi] != d), $sformatf("cw %0d fail flag", oi));
        if (fail) m_fail++;
        oi++; ow = 0;
      end else ow++;
    end
  end

  initial begin
    init();
    for (int i = 0; i < NCW; i++) begin
      int n, v;
      int degs [];
      u8  vals [], syn [];
      ks[i] = (i == 0) ? 239 : (i == 1) ? 1 : (i == 2) ? 224 : 1 + int'($urandom_range(0, 238));
      n = ks[i] + 16;
      rnd[i] = (i % 8 == 7);
      ev[i] = new[n];
      foreach (ev[i][s]) ev[i][s] = 0;
      if (!rnd[i]) begin
        v = i % 9;
        degs = new[v];
        vals = new[v];
        for (int e = 0; e < v; e++) begin
          bit dup;
          do begin
            degs[e] = int'($urandom_range(0, n - 1));
            dup = 0;
            for (int f = 0; f < e; f++) if (degs[f] == degs[e]) dup = 1;
          end while (dup);
          vals[e] = u8'($urandom_range(1, 255));
          ev[i][n - 1 - degs[e]] = vals[e];
        end
        locator(degs, sig[i]);
        err_syndromes(degs, vals, syn);
        om[i] = new[8];
        for (int j = 0; j < 8; j++) om[i][j] = pmul_coef(sig[i], syn, j);
      end else begin
        sig[i] = new[9];
        om[i] = new[8];
        foreach (sig[i][j]) sig[i][j] = u8'($urandom_range(1, 255));
        foreach (om[i][j]) om[i][j] = u8'($urandom_range(0, 255));
      end
      roots[i] = 0;
      for (int s = 0; s < n; s++)
        if (peval(sig[i], apow(255 - (n - 1 - s))) == 0) roots[i]++;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NCW; i++) begin
      for (int j = 0; j <= 8; j++) sigma[j] <= sig[i][j];
      for (int j = 0; j < 8; j++) omega[j] <= om[i][j];
      kes_valid <= 1;
      kes_k <= ksize_t'(ks[i]);
      st[i] = cyc + 1;
      @(posedge clk);
      kes_valid <= 0;
      repeat (cwords(ks[i]) - 1) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    check(oi == NCW, "all codewords out");
    check(m_fail > 0, "failure flag seen");
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
