// tb_rs_top: end-to-end test of the codec at its full size.
//
// Phase 1 streams messages of many sizes through the encoder, back to back
// with one codeword slot each (ceil((k+16)/8) clocks), and compares every
// output word with a reference long-division encoder and the three-clock
// latency. Phase 2 takes the encoder's own codewords, adds 0..8 random symbol
// errors (and 9..12 for some, which must be flagged), and streams them
// through the decoder, starting each codeword at the earliest clock the wait
// time allows, or after a fixed 29-clock wait. Every corrected codeword must
// equal the encoder output, arrive 71 + ceil(k/8) clocks after its first
// word, and report the right error count. Phase 3 starts one codeword too
// early on purpose and expects the overrun flag.
//
// Mechanisms counted (each must happen at least once): every zero-padding
// amount 0..7 in encoder and decoder, the largest and smallest code, same-size
// codewords back to back without wait, wait time increased (shorter after
// longer) and decreased (longer after shorter), the fixed 29-clock wait, a
// codeword with 8 corrected errors, an uncorrectable codeword, the overrun
// flag.
module tb_rs_top;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int NCW = 48;

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

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test data ----------------
  int ks [NCW];
  int nerr [NCW];
  u8  msg [NCW][];
  u8  ref_cw [NCW][];
  u8  enc_cw [NCW][];
  u8  rx_cw [NCW][];

  function automatic int cwords(int k); return (k + 16 + 7) / 8; endfunction
  function automatic int mwords(int k); return (k + 7) / 8; endfunction

  // mechanism counters
  int m_pad [8];
  int m_kmax = 0, m_kmin = 0, m_same = 0, m_incr = 0, m_decr = 0, m_fixed = 0;
  int m_t8 = 0, m_fail = 0, m_ovr = 0;

  initial begin
    int sizes [$];
    init();
    // sizes: Table-1 types (pad 0..7), extremes, the timing-chart sizes, runs
    sizes = '{239, 1, 224, 223, 222, 221, 220, 219, 218, 217, 80, 83, 120, 200,
              239, 239, 17, 17, 1, 100, 100, 100, 56, 57, 58, 59, 60, 61, 62, 63};
    for (int i = 0; i < NCW; i++) begin
      ks[i] = (i < sizes.size()) ? sizes[i] : 1 + int'($urandom_range(0, 238));
      msg[i] = new[ks[i]];
      foreach (msg[i][s]) msg[i][s] = u8'($urandom_range(0, 255));
      encode(msg[i], ks[i], ref_cw[i]);
      nerr[i] = (i % 11 == 5) ? 9 + int'($urandom_range(0, 3))
              : (i % 7 == 3)  ? 8
              : int'($urandom_range(0, 8));
      if (ks[i] + 16 < 12 + nerr[i]) nerr[i] = 8;
      m_pad[(8 - ks[i] % 8) % 8]++;
      if (ks[i] == 239) m_kmax++;
      if (ks[i] == 1)   m_kmin++;
    end
  end

  // ---------------- phase 1: encoder ----------------
  int enc_out_idx = 0, enc_out_w = 0;
  longint enc_start_cyc [NCW];

  always @(posedge clk) begin
    if (rst_n && enc_dout_valid) begin
      if (enc_out_idx < NCW) begin
        int k;
        k = ks[enc_out_idx];
        if (enc_dout_sop) begin
          check(enc_out_w == 0, "encoder sop position");
          check(cyc - enc_start_cyc[enc_out_idx] == 3, "encoder latency 3");
          enc_cw[enc_out_idx] = new[k + 16];
        end
        for (int l = 0; l < 8; l++) begin
          int s;
          s = 8 * enc_out_w + l;
          if (s < k + 16) begin
            enc_cw[enc_out_idx][s] = enc_dout[l];
            check(enc_dout[l] == ref_cw[enc_out_idx][s], $sformatf("encoder cw %0d sym %0d", enc_out_idx, s));
          end else begin
            check(enc_dout[l] == 0, "encoder zero fill");
          end
        end
        if (enc_dout_eop) begin
          check(enc_out_w == cwords(k) - 1, "encoder eop position");
          enc_out_idx++;
          enc_out_w = 0;
        end else begin
          enc_out_w++;
        end
      end else begin
        check(0, "unexpected encoder output");
      end
    end
  end

  // ---------------- phase 2: decoder monitor ----------------
  int dec_out_idx = 0, dec_out_w = 0;
  longint dec_start_cyc [NCW+1];
  int n_dec = NCW;

  always @(posedge clk) begin
    if (rst_n && dec_dout_valid && dec_out_idx < n_dec) begin
      int k;
      k = ks[dec_out_idx];
      if (dec_dout_sop) begin
        check(dec_out_w == 0, "decoder sop position");
        check(cyc - dec_start_cyc[dec_out_idx] == 71 + mwords(k),
              $sformatf("decoder latency cw %0d: %0d, expected %0d", dec_out_idx,
                        cyc - dec_start_cyc[dec_out_idx], 71 + mwords(k)));
      end
      if (nerr[dec_out_idx] <= 8) begin
        for (int l = 0; l < 8; l++) begin
          int s;
          s = 8 * dec_out_w + l;
          if (s < k + 16)
            check(dec_dout[l] == enc_cw[dec_out_idx][s],
                  $sformatf("decoder cw %0d (k=%0d, %0d errors) sym %0d", dec_out_idx, k, nerr[dec_out_idx], s));
          else
            check(dec_dout[l] == 0, "decoder zero fill");
        end
      end
      if (dec_dout_eop) begin
        if ($test$plusargs("verbose"))
          $display("cw %0d k=%0d nerr=%0d errcnt=%0d fail=%0d ovr=%0d", dec_out_idx, k,
                   nerr[dec_out_idx], dec_errcnt, dec_fail, dec_overrun);
        check(dec_out_w == cwords(k) - 1, "decoder eop position");
        if (nerr[dec_out_idx] <= 8) begin
          check(!dec_fail, $sformatf("no fail for correctable cw %0d", dec_out_idx));
          check(dec_errcnt == 4'(nerr[dec_out_idx]),
                $sformatf("errcnt cw %0d: %0d vs %0d", dec_out_idx, dec_errcnt, nerr[dec_out_idx]));
          if (nerr[dec_out_idx] == 8 && !dec_fail) m_t8++;
        end else begin
          check(dec_fail, $sformatf("fail for %0d errors, cw %0d", nerr[dec_out_idx], dec_out_idx));
          if (dec_fail) m_fail++;
        end
        dec_out_idx++;
        dec_out_w = 0;
      end else begin
        dec_out_w++;
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // phase 1: encoder, one slot of ceil((k+16)/8) clocks per codeword
    for (int i = 0; i < NCW; i++) begin
      for (int w = 0; w < cwords(ks[i]); w++) begin
        sym8_t word;
        word = '0;
        for (int l = 0; l < 8; l++)
          if (w < mwords(ks[i]) && 8 * w + l < ks[i]) word[l] = msg[i][8 * w + l];
        enc_start     <= (w == 0);
        enc_code_size <= (w == 0) ? ksize_t'(ks[i]) : 8'h00;
        enc_din       <= word;
        if (w == 0) enc_start_cyc[i] = cyc + 1;
        @(posedge clk);
      end
    end
    enc_start <= 0; enc_din <= '0;
    repeat (10) @(posedge clk);
    check(enc_out_idx == NCW, "all codewords encoded");

    // inject errors into the encoder's codewords
    for (int i = 0; i < NCW; i++) begin
      int pos [$];
      pos.delete();
      rx_cw[i] = new[ks[i] + 16](enc_cw[i]);
      while (pos.size() < nerr[i]) begin
        int p;
        bit dup;
        p = int'($urandom_range(0, ks[i] + 15));
        dup = 0;
        foreach (pos[j]) if (pos[j] == p) dup = 1;
        if (!dup) pos.push_back(p);
      end
      foreach (pos[j]) rx_cw[i][pos[j]] ^= u8'($urandom_range(1, 255));
    end

    // phase 2: decoder
    for (int i = 0; i < NCW; i++) begin
      int gap;
      if (i > 0) begin
        int ci, cj, wj;
        ci = mwords(ks[i-1]); cj = mwords(ks[i]); wj = cwords(ks[i]);
        if (i % 5 == 4) begin
          gap = 29;              // fixed wait time of the longest/shortest pair
          m_fixed++;
        end else begin
          gap = 0;
          if (ci > cj) gap = ci - cj;
          if (16 - wj > gap) gap = 16 - wj;
        end
        if (ks[i] == ks[i-1] && gap == 0) m_same++;
        if (ci > cj && i % 5 != 4) m_incr++;
        if (cj > ci && gap == 0) m_decr++;
        repeat (gap) begin
          dec_start <= 0; dec_din <= '0;
          @(posedge clk);
        end
      end
      for (int w = 0; w < cwords(ks[i]); w++) begin
        sym8_t word;
        word = '0;
        for (int l = 0; l < 8; l++)
          if (8 * w + l < ks[i] + 16) word[l] = rx_cw[i][8 * w + l];
        dec_start     <= (w == 0);
        dec_code_size <= (w == 0) ? ksize_t'(ks[i]) : 8'h00;
        dec_din       <= word;
        if (w == 0) dec_start_cyc[i] = cyc + 1;
        @(posedge clk);
      end
    end
    dec_start <= 0; dec_din <= '0;
    repeat (200) @(posedge clk);
    check(dec_out_idx == NCW, $sformatf("all codewords decoded (%0d)", dec_out_idx));
    check(!dec_overrun, "no overrun while the wait time is respected");

    // phase 3: a short codeword one clock after a long one violates the wait
    for (int r = 0; r < 2; r++) begin
      int k;
      k = (r == 0) ? 239 : 1;
      for (int w = 0; w < cwords(k); w++) begin
        dec_start     <= (w == 0);
        dec_code_size <= ksize_t'(k);
        dec_din       <= '0;
        @(posedge clk);
      end
    end
    dec_start <= 0;
    repeat (150) @(posedge clk);
    check(dec_overrun, "overrun flagged for a too-early codeword");
    if (dec_overrun) m_ovr++;

    // mechanism coverage
    for (int z = 0; z < 8; z++) check(m_pad[z] > 0, $sformatf("padding %0d exercised", z));
    check(m_kmax > 0, "RS(255,239) exercised");
    check(m_kmin > 0, "RS(17,1) exercised");
    check(m_same > 0, "same-size codewords without wait");
    check(m_incr > 0, "wait time increased");
    check(m_decr > 0, "wait time decreased");
    check(m_fixed > 0, "fixed 29-clock wait");
    check(m_t8 > 0, "eight errors corrected");
    check(m_fail > 0, "uncorrectable codeword flagged");
    check(m_ovr > 0, "overrun flag");
    $display("mechanisms: pad=%p kmax=%0d kmin=%0d same=%0d incr=%0d decr=%0d fixed=%0d t8=%0d fail=%0d ovr=%0d",
             m_pad, m_kmax, m_kmin, m_same, m_incr, m_decr, m_fixed, m_t8, m_fail, m_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
