// tb_rs_permute: the permutation with EXTRA_WORDS = 0 (encoder use) and 2
// (syndrome use). Random symbol streams of every length class are driven in
// and each permuted word is compared with the stream prefixed by
// (8 - k mod 8) mod 8 zeros; word count, first/last flags and the one-clock
// latency are checked.
module tb_rs_permute;
  import rs_pkg::*;

  localparam int NCW = 40;

  logic   clk = 0, rst_n = 0;
  logic   start = 0;
  ksize_t code_size = 0;
  sym8_t  din = '0;
  sym8_t  pw0, pw2;
  logic   v0, f0, l0, v2, f2, l2;

  rs_permute #(.EXTRA_WORDS(0)) dut0 (.clk, .rst_n, .start, .code_size, .din,
                                      .pw(pw0), .pw_valid(v0), .pw_first(f0), .pw_last(l0));
  rs_permute #(.EXTRA_WORDS(2)) dut2 (.clk, .rst_n, .start, .code_size, .din,
                                      .pw(pw2), .pw_valid(v2), .pw_first(f2), .pw_last(l2));

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

  int ks [NCW];
  byte unsigned sym [NCW][];
  longint st [NCW];

  function automatic int nw(int k, int extra); return (k + 7) / 8 + extra; endfunction

  // expected permuted word j of codeword i
  function automatic sym8_t expect_word(int i, int j, int extra);
    sym8_t w;
    int z, n;
    z = (8 - ks[i] % 8) % 8;
    n = ks[i] + 8 * extra;
    for (int l = 0; l < 8; l++) begin
      int s;
      s = 8 * j + l - z;
      w[l] = (s >= 0 && s < n) ? sym[i][s] : 8'h00;
    end
    return w;
  endfunction

  int i0 = 0, j0 = 0, i2 = 0, j2 = 0;
  always @(posedge clk) begin
    if (rst_n && v0 && i0 < NCW) begin
      if (j0 == 0) check(f0 && cyc - st[i0] == 1, "ex0 first word / latency");
      check(pw0 == expect_word(i0, j0, 0), $sformatf("ex0 cw %0d word %0d", i0, j0));
      check(l0 == (j0 == nw(ks[i0], 0) - 1), "ex0 last flag");
      if (l0) begin i0++; j0 = 0; end else j0++;
    end
    if (rst_n && v2 && i2 < NCW) begin
      if (j2 == 0) check(f2 && cyc - st[i2] == 1, "ex2 first word / latency");
      check(pw2 == expect_word(i2, j2, 2), $sformatf("ex2 cw %0d word %0d", i2, j2));
      check(l2 == (j2 == nw(ks[i2], 2) - 1), "ex2 last flag");
      if (l2) begin i2++; j2 = 0; end else j2++;
    end
  end

  initial begin
    for (int i = 0; i < NCW; i++) begin
      ks[i] = (i < 8) ? 233 + (i % 7) - (i / 7) : 1 + int'($urandom_range(0, 238));
      if (i == 8) ks[i] = 1;
      sym[i] = new[ks[i] + 16];
      foreach (sym[i][s]) sym[i][s] = byte'($urandom_range(0, 255));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NCW; i++) begin
      for (int w = 0; w < nw(ks[i], 2); w++) begin
        sym8_t word;
        word = '0;
        for (int l = 0; l < 8; l++) if (8 * w + l < ks[i] + 16) word[l] = sym[i][8 * w + l];
        start <= (w == 0);
        code_size <= ksize_t'(ks[i]);
        din <= word;
        if (w == 0) st[i] = cyc + 1;
        @(posedge clk);
      end
    end
    start <= 0;
    repeat (10) @(posedge clk);
    check(i0 == NCW && i2 == NCW, "all words permuted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
