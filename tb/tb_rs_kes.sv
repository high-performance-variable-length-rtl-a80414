// tb_rs_kes: syndromes of random error patterns (0..8 errors, and a few of
// 9..12) are shifted into the key equation solver one per clock, a new set
// every 16 clocks. For every correctable pattern the result must satisfy
// sigma(X^-1) = 0 at each error location, deg sigma = number of errors,
// sigma_0 != 0 and the key equation sigma S = omega (mod x^16). Results must
// appear 48 clocks after the clock carrying S15, with the code_size tag.
module tb_rs_kes;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int NSET = 60;

  logic   clk = 0, rst_n = 0;
  gf_t    syn = 0;
  logic   syn_valid = 0, syn_first = 0;
  ksize_t syn_k = 0;
  gf_t    sigma [T_CORR+1];
  gf_t    omega [T_CORR];
  logic   kes_valid, overrun;
  ksize_t kes_k;

  rs_kes dut (.*);

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

  int  nerr [NSET];
  int  degs [NSET][];
  u8   vals [NSET][];
  u8   syns [NSET][];
  int  ks [NSET];
  longint s15 [NSET];
  int  oi = 0;

  always @(posedge clk) begin
    if (rst_n && kes_valid && oi < NSET) begin
      u8 sg [];
      int d;
      check(cyc - s15[oi] == 48, $sformatf("set %0d latency %0d", oi, cyc - s15[oi]));
      check(kes_k == ksize_t'(ks[oi]), "code_size tag");
      sg = new[9];
      foreach (sg[i]) sg[i] = sigma[i];
      d = 0;
      foreach (sg[i]) if (sg[i] != 0) d = i;
      if (nerr[oi] <= 8) begin
        check(d == nerr[oi], $sformatf("set %0d deg sigma %0d vs %0d", oi, d, nerr[oi]));
        check(sg[0] != 0, "sigma_0 nonzero");
        foreach (degs[oi][e])
          check(peval(sg, apow(255 - degs[oi][e])) == 0, $sformatf("set %0d root %0d", oi, e));
        for (int j = 0; j < 16; j++)
          check(pmul_coef(sg, syns[oi], j) == ((j < 8) ? omega[j] : 8'h00),
                $sformatf("set %0d key equation coef %0d", oi, j));
      end
      oi++;
    end
  end

  initial begin
    init();
    for (int i = 0; i < NSET; i++) begin
      int n;
      ks[i] = 1 + int'($urandom_range(0, 238));
      n = ks[i] + 16;
      nerr[i] = (i % 10 == 9) ? 9 + int'($urandom_range(0, 3)) : i % 9;
      degs[i] = new[nerr[i]];
      vals[i] = new[nerr[i]];
      for (int e = 0; e < nerr[i]; e++) begin
        bit dup;
        do begin
          degs[i][e] = int'($urandom_range(0, n - 1));
          dup = 0;
          for (int f = 0; f < e; f++) if (degs[i][f] == degs[i][e]) dup = 1;
        end while (dup);
        vals[i][e] = u8'($urandom_range(1, 255));
      end
      err_syndromes(degs[i], vals[i], syns[i]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NSET; i++) begin
      for (int j = 0; j < 16; j++) begin
        syn <= syns[i][j];
        syn_valid <= 1;
        syn_first <= (j == 0);
        syn_k <= ksize_t'(ks[i]);
        if (j == 15) s15[i] = cyc + 1;
        @(posedge clk);
      end
    end
    syn_valid <= 0;
    repeat (60) @(posedge clk);
    check(oi == NSET, "all sets solved");
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
