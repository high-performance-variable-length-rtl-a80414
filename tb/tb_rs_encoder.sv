// tb_rs_encoder: messages of every padding class, back to back with one
// codeword slot each, through the encoder. Each output word is compared with
// a reference long-division encoder (message, then P0..P15, zero fill) and
// the first word must appear three clocks after the first input word.
module tb_rs_encoder;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int NCW = 40;

  logic   clk = 0, rst_n = 0;
  logic   start = 0;
  ksize_t code_size = 0;
  sym8_t  din = '0;
  sym8_t  dout;
  logic   dout_valid, dout_sop, dout_eop;

  rs_encoder dut (.*);

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
  u8  msg [NCW][];
  u8  cw [NCW][];
  longint st [NCW];
  int oi = 0, ow = 0;

  function automatic int cwords(int k); return (k + 16 + 7) / 8; endfunction
  function automatic int mwords(int k); return (k + 7) / 8; endfunction

  always @(posedge clk) begin
    if (rst_n && dout_valid && oi < NCW) begin
      if (ow == 0) check(dout_sop && cyc - st[oi] == 3, $sformatf("cw %0d sop / latency 3", oi));
      for (int l = 0; l < 8; l++) begin
        int s;
        s = 8 * ow + l;
        check(dout[l] == ((s < ks[oi] + 16) ? cw[oi][s] : 8'h00),
              $sformatf("cw %0d (k=%0d) symbol %0d", oi, ks[oi], s));
      end
      check(dout_eop == (ow == cwords(ks[oi]) - 1), "eop");
      if (dout_eop) begin oi++; ow = 0; end else ow++;
    end
  end

  initial begin
    init();
    for (int i = 0; i < NCW; i++) begin
      ks[i] = (i < 8) ? 239 - i : 1 + int'($urandom_range(0, 238));
      if (i == 8) ks[i] = 1;
      if (i == 9) ks[i] = 80;
      if (i == 10) ks[i] = 83;
      msg[i] = new[ks[i]];
      foreach (msg[i][s]) msg[i][s] = u8'($urandom_range(0, 255));
      encode(msg[i], ks[i], cw[i]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NCW; i++) begin
      for (int w = 0; w < cwords(ks[i]); w++) begin
        sym8_t word;
        word = '0;
        for (int l = 0; l < 8; l++)
          if (w < mwords(ks[i]) && 8 * w + l < ks[i]) word[l] = msg[i][8 * w + l];
        start <= (w == 0);
        code_size <= ksize_t'(ks[i]);
        din <= word;
        if (w == 0) st[i] = cyc + 1;
        @(posedge clk);
      end
    end
    start <= 0; din <= '0;
    repeat (10) @(posedge clk);
    check(oi == NCW, "all codewords out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
