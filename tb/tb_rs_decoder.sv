// tb_rs_decoder: reference-encoded codewords with 0..8 random symbol errors
// (and a few with 9..12) stream through the decoder. Codeword sequences
// follow the data-flow cases of the design: RS(255,239) then RS(17,1) with
// the 29-clock wait, a shorter codeword after a longer one (wait increased by
// the word difference), a longer after a shorter (no extra wait) and a run of
// equal RS(239,223) codewords with no wait at all. Checked: every corrected
// symbol, the 71 + ceil(k/8) latency, the error count and the fail flag on the
// last word, gap-free output of back-to-back equal codewords, no overrun.
module tb_rs_decoder;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       start = 0;
  ksize_t     code_size = 0;
  sym8_t      din = '0;
  sym8_t      dout;
  logic       dout_valid, dout_sop, dout_eop, fail, overrun;
  logic [3:0] errcnt;

  rs_decoder dut (.*);

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

  localparam int NCW = 16;
  int ks [NCW] = '{239, 1, 224, 120, 200, 239, 223, 223, 223, 223, 80, 83, 17, 150, 60, 239};
  int nerr [NCW];
  u8  cw [NCW][];
  u8  rx [NCW][];
  longint st [NCW];
  longint last_eop = -10;
  int oi = 0, ow = 0, gapless = 0;

  function automatic int cwords(int k); return (k + 16 + 7) / 8; endfunction
  function automatic int mwords(int k); return (k + 7) / 8; endfunction

  always @(posedge clk) begin
    if (rst_n && dout_valid && oi < NCW) begin
      int n;
      n = ks[oi] + 16;
      if (ow == 0) begin
        check(dout_sop, "sop");
        check(cyc - st[oi] == 71 + mwords(ks[oi]),
              $sformatf("cw %0d latency %0d", oi, cyc - st[oi]));
        if (oi > 0 && ks[oi] == ks[oi-1] && cyc == last_eop + 1) gapless++;
      end
      if (nerr[oi] <= 8)
        for (int l = 0; l < 8; l++) begin
          int s;
          s = 8 * ow + l;
          check(dout[l] == ((s < n) ? cw[oi][s] : 8'h00), $sformatf("cw %0d symbol %0d", oi, s));
        end
      if (dout_eop) begin
        check(ow == cwords(ks[oi]) - 1, "eop position");
        if (nerr[oi] <= 8) begin
          check(!fail && errcnt == 4'(nerr[oi]), $sformatf("cw %0d errcnt %0d/%0d fail %0d", oi, errcnt, nerr[oi], fail));
        end else begin
          check(fail, $sformatf("cw %0d fail flag", oi));
        end
        last_eop = cyc;
        oi++; ow = 0;
      end else ow++;
    end
  end

  initial begin
    init();
    for (int i = 0; i < NCW; i++) begin
      u8 msg [];
      int pos [$];
      msg = new[ks[i]];
      foreach (msg[s]) msg[s] = u8'($urandom_range(0, 255));
      encode(msg, ks[i], cw[i]);
      nerr[i] = (i == 4 || i == 13) ? 9 + int'($urandom_range(0, 3)) : (i % 9);
      rx[i] = new[ks[i] + 16](cw[i]);
      pos.delete();
      while (pos.size() < nerr[i]) begin
        int p;
        bit dup;
        p = int'($urandom_range(0, ks[i] + 15));
        dup = 0;
        foreach (pos[j]) if (pos[j] == p) dup = 1;
        if (!dup) pos.push_back(p);
      end
      foreach (pos[j]) rx[i][pos[j]] ^= u8'($urandom_range(1, 255));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NCW; i++) begin
      int gap;
      gap = 0;
      if (i > 0) begin
        // the wait time: previous minus current message words, and a
        // 16-clock spacing of syndrome loads for short codewords
        if (mwords(ks[i-1]) > mwords(ks[i])) gap = mwords(ks[i-1]) - mwords(ks[i]);
        if (16 - cwords(ks[i]) > gap) gap = 16 - cwords(ks[i]);
      end
      for (int g = 0; g < gap; g++) begin
        start <= 0; din <= '0;
        @(posedge clk);
      end
      for (int w = 0; w < cwords(ks[i]); w++) begin
        sym8_t word;
        word = '0;
        for (int l = 0; l < 8; l++) if (8 * w + l < ks[i] + 16) word[l] = rx[i][8 * w + l];
        start <= (w == 0);
        code_size <= ksize_t'(ks[i]);
        din <= word;
        if (w == 0) st[i] = cyc + 1;
        @(posedge clk);
      end
    end
    start <= 0; din <= '0;
    repeat (150) @(posedge clk);
    check(oi == NCW, "all codewords decoded");
    check(gapless >= 3, "equal codewords leave back to back");
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
