// tb_rs_syndrome: random received words of every padding type through the
// syndrome block; the 16 serial syndromes are compared with a reference
// S_i = R(alpha^i) evaluated symbol by symbol, and S0 must appear W + 1
// clocks after the first word (W = codeword words).
module tb_rs_syndrome;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int NCW = 40;

  logic   clk = 0, rst_n = 0;
  logic   start = 0;
  ksize_t code_size = 0;
  sym8_t  din = '0;
  gf_t    syn;
  logic   syn_valid, syn_first, overrun;
  ksize_t syn_k;

  rs_syndrome dut (.*);

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
  u8  cw [NCW][];
  longint st_cyc [NCW];
  int oidx = 0, opos = 0;

  function automatic int cwords(int k); return (k + 16 + 7) / 8; endfunction

  always @(posedge clk) begin
    if (rst_n && syn_valid && oidx < NCW) begin
      if (opos == 0) begin
        check(syn_first, "syn_first with S0");
        check(cyc - st_cyc[oidx] == cwords(ks[oidx]) + 1, "S0 timing");
        check(syn_k == ksize_t'(ks[oidx]), "code_size tag");
      end
      check(syn == syndrome(cw[oidx], ks[oidx] + 16, opos),
            $sformatf("cw %0d k=%0d S%0d", oidx, ks[oidx], opos));
      if (opos == 15) begin opos = 0; oidx++; end
      else opos++;
    end
  end

  initial begin
    init();
    for (int i = 0; i < NCW; i++) begin
      ks[i] = (i < 8) ? 232 - i : ((i < 10) ? ((i == 8) ? 1 : 239) : 1 + int'($urandom_range(0, 238)));
      cw[i] = new[ks[i] + 16];
      foreach (cw[i][s]) cw[i][s] = u8'($urandom_range(0, 255));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NCW; i++) begin
      // keep the serial output free: loads at least 16 clocks apart
      for (int g = cwords(ks[i]); g < 16 && i > 0; g++) begin
        start <= 0; din <= '0;
        @(posedge clk);
      end
      for (int w = 0; w < cwords(ks[i]); w++) begin
        sym8_t word;
        word = '0;
        for (int l = 0; l < 8; l++) if (8 * w + l < ks[i] + 16) word[l] = cw[i][8 * w + l];
        start <= (w == 0);
        code_size <= ksize_t'(ks[i]);
        din <= word;
        if (w == 0) st_cyc[i] = cyc + 1;
        @(posedge clk);
      end

    end
    repeat (40) @(posedge clk);
    check(oidx == NCW, "all syndrome sets seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
