// tb_rs_workloads: the code sizes and input sequences the design is meant
// for, run through the whole codec (rs_top at its default size).
//
// Each codeword is fed at the same clock to the encoder (its message words)
// and to the decoder (the reference codeword with up to 8 symbol errors), and
// both outputs are compared with an independent reference: the encoder's
// words and 3-clock latency, the decoder's corrected words, its latency of
// 71 + ceil(k/8) clocks, error count and fail flag.
//
// Sequences:
//   timing chart  k = 80, 83, 223 starting at clocks 1, 39 and 78
//   longest/shortest  RS(255,239) then RS(17,1) after the 29-clock wait;
//                 the two corrected codewords must leave back to back
//   same size     three RS(240,224) codewords with no gap, again leaving
//                 back to back
//   Table-1 codes every padding type (k mod 8 = 0..7) at p = 28
//                 (RS(240,224) .. RS(233,217)) and at p = 1 (RS(24,8) ..
//                 RS(17,1)), 8 errors each, 29 idle clocks apart
// Each sequence is counted when all its codewords came out correct, and a
// sequence that never completes counts as a failure.
module tb_rs_workloads;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int NMAX = 32;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       enc_start = 0, dec_start = 0;
  ksize_t     enc_code_size = 0, dec_code_size = 0;
  sym8_t      enc_din = '0, dec_din = '0;
  sym8_t      enc_dout, dec_dout;
  logic       enc_dout_valid, enc_dout_sop, enc_dout_eop;
  logic       dec_dout_valid, dec_dout_sop, dec_dout_eop;
  logic [3:0] dec_errcnt;
  logic       dec_fail, dec_overrun;

  rs_top dut (.*);

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
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cwords(int k); return (k + 16 + 7) / 8; endfunction
  function automatic int mwords(int k); return (k + 7) / 8; endfunction

  // ---------------- schedule ----------------
  // seq: sequence number; dstart: clocks from the previous start
  int ncw = 0;
  int ks [NMAX], nerr [NMAX], seq [NMAX], dstart [NMAX];
  u8  msg [NMAX][], ref_cw [NMAX][], rx_cw [NMAX][];
  bit cw_ok [NMAX];
  longint in_cyc [NMAX], out_cyc [NMAX];

  localparam int NSEQ = 4;
  string seq_name [NSEQ] = '{"timing chart", "longest/shortest", "same size", "Table-1 codes"};

  function automatic void add(int s, int k, int e, int d);
    seq[ncw] = s; ks[ncw] = k; nerr[ncw] = e; dstart[ncw] = d;
    ncw++;
  endfunction

  function automatic void build();
    int p1 [8];
    // Fig.-9-like chart: starts at clocks 1, 39, 78
    add(0, 80, 3, 0);
    add(0, 83, 0, 38);
    add(0, 223, 8, 39);
    // longest then shortest after the 29-clock wait (first start after the
    // previous sequence has drained)
    add(1, 239, 8, 29 + cwords(223));
    add(1, 1, 8, cwords(239) + 29);
    // same size back to back
    add(2, 224, 5, cwords(1) + 29 + 30);
    add(2, 224, 8, cwords(224));
    add(2, 224, 2, cwords(224));
    // all padding types at p = 28 and p = 1
    for (int t = 0; t < 8; t++) add(3, 224 - t, 8, cwords(ncw > 0 ? ks[ncw-1] : 0) + 29);
    for (int t = 0; t < 8; t++) add(3, 8 - t, 8, cwords(ks[ncw-1]) + 29);
  endfunction

  // distinct random error positions with non-zero values
  function automatic void corrupt(int i);
    int n;
    bit used [];
    n = ks[i] + 16;
    used = new[n];
    rx_cw[i] = new[n];
    foreach (ref_cw[i][s]) rx_cw[i][s] = ref_cw[i][s];
    for (int e = 0; e < nerr[i]; e++) begin
      int pos;
      do pos = int'($urandom_range(0, n - 1)); while (used[pos]);
      used[pos] = 1;
      rx_cw[i][pos] ^= u8'($urandom_range(1, 255));
    end
  endfunction

  // ---------------- encoder monitor ----------------
  int eo = 0, ew = 0;
  always @(posedge clk) begin
    if (rst_n && enc_dout_valid) begin
      if (eo < ncw) begin
        if (enc_dout_sop) check(cyc - in_cyc[eo] == 3, $sformatf("encoder latency, cw %0d", eo));
        for (int l = 0; l < 8; l++) begin
          int s;
          s = 8 * ew + l;
          check(enc_dout[l] == ((s < ks[eo] + 16) ? ref_cw[eo][s] : 8'h00),
                $sformatf("encoder cw %0d (k=%0d) symbol %0d", eo, ks[eo], s));
        end
        if (enc_dout_eop) begin
          check(ew == cwords(ks[eo]) - 1, "encoder codeword length");
          eo++; ew = 0;
        end else ew++;
      end else check(0, "unexpected encoder output");
    end
  end

  // ---------------- decoder monitor ----------------
  int dq = 0, dw = 0;
  bit cur_ok;
  always @(posedge clk) begin
    if (rst_n && dec_dout_valid) begin
      if (dq < ncw) begin
        if (dec_dout_sop) begin
          out_cyc[dq] = cyc;
          cur_ok = (cyc - in_cyc[dq] == 71 + mwords(ks[dq]));
          check(cur_ok, $sformatf("decoder latency cw %0d: %0d, expected %0d", dq,
                                   cyc - in_cyc[dq], 71 + mwords(ks[dq])));
        end
        for (int l = 0; l < 8; l++) begin
          int s;
          bit ok;
          s = 8 * dw + l;
          ok = (dec_dout[l] == ((s < ks[dq] + 16) ? ref_cw[dq][s] : 8'h00));
          cur_ok &= ok;
          check(ok, $sformatf("decoder cw %0d (k=%0d, %0d errors) symbol %0d", dq, ks[dq], nerr[dq], s));
        end
        if (dec_dout_eop) begin
          bit ok;
          ok = (dw == cwords(ks[dq]) - 1) && !dec_fail && (dec_errcnt == 4'(nerr[dq]));
          check(ok, $sformatf("decoder cw %0d: length %0d, errcnt %0d (expected %0d), fail %0d",
                              dq, dw + 1, dec_errcnt, nerr[dq], dec_fail));
          cw_ok[dq] = cur_ok && ok;
          dq++; dw = 0;
        end else dw++;
      end else check(0, "unexpected decoder output");
    end
  end

  // ---------------- stimulus ----------------
  int seq_done [NSEQ];

  initial begin
    init();
    build();
    for (int i = 0; i < ncw; i++) begin
      msg[i] = new[ks[i]];
      foreach (msg[i][s]) msg[i][s] = u8'($urandom_range(0, 255));
      encode(msg[i], ks[i], ref_cw[i]);
      corrupt(i);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    for (int i = 0; i < ncw; i++) begin
      // idle clocks between the end of the previous codeword and this start
      int idle;
      idle = (i == 0) ? 0 : dstart[i] - cwords(ks[i-1]);
      for (int g = 0; g < idle; g++) begin
        enc_start <= 0; dec_start <= 0; enc_din <= '0; dec_din <= '0;
        @(posedge clk);
      end
      for (int w = 0; w < cwords(ks[i]); w++) begin
        sym8_t ew_, dw_;
        ew_ = '0; dw_ = '0;
        for (int l = 0; l < 8; l++) begin
          int s;
          s = 8 * w + l;
          if (s < ks[i])      ew_[l] = msg[i][s];
          if (s < ks[i] + 16) dw_[l] = rx_cw[i][s];
        end
        enc_start     <= (w == 0);
        dec_start     <= (w == 0);
        enc_code_size <= ksize_t'(ks[i]);
        dec_code_size <= ksize_t'(ks[i]);
        enc_din       <= (w < mwords(ks[i])) ? ew_ : '0;
        dec_din       <= dw_;
        if (w == 0) in_cyc[i] = cyc + 1;
        @(posedge clk);
      end
    end
    enc_start <= 0; dec_start <= 0; enc_din <= '0; dec_din <= '0;
    repeat (150) @(posedge clk);

    check(eo == ncw, "all encoder codewords seen");
    check(dq == ncw, "all decoder codewords seen");
    check(!dec_overrun, "no overrun on a valid schedule");
    check(in_cyc[2] - in_cyc[0] == 77 && in_cyc[1] - in_cyc[0] == 38, "timing-chart starts 1, 39, 78");
    // back-to-back output where the wait rule promises it
    check(out_cyc[4] == out_cyc[3] + cwords(239), "RS(17,1) output right after RS(255,239)");
    check(out_cyc[6] == out_cyc[5] + cwords(224) && out_cyc[7] == out_cyc[6] + cwords(224),
          "same-size codewords leave back to back");

    for (int s = 0; s < NSEQ; s++) begin
      bit all_ok;
      all_ok = 1;
      for (int i = 0; i < ncw; i++) if (seq[i] == s && !cw_ok[i]) all_ok = 0;
      seq_done[s] = all_ok;
      check(all_ok, $sformatf("sequence '%s' completed", seq_name[s]));
      $display("sequence %-18s %s", seq_name[s], all_ok ? "ok" : "FAILED");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
