// tb_rs_fifo: a new random word is written every clock and a random
// code_size is applied to the tap every clock; the output must equal the word
// written ceil(k/8) + 70 clocks earlier, over the whole tap range.
module tb_rs_fifo;
  import rs_pkg::*;

  logic   clk = 0, rst_n = 0;
  sym8_t  din = '0;
  ksize_t tap_k = 1;
  sym8_t  dout;

  rs_fifo dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sym8_t hist [$];
  bit    seen_min = 0, seen_max = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      sym8_t nw;
      // start of cycle t: new input word and tap, recorded as cycle t's word
      @(posedge clk);
      nw = {$urandom, $urandom};
      din   <= nw;
      tap_k <= ksize_t'((t % 5 == 0) ? 239 : (t % 7 == 0) ? 1 : $urandom_range(1, 239));
      hist.push_back(nw);
      // middle of cycle t: the output must be the word of cycle t - d
      @(negedge clk);
      if (hist.size() > 101) begin
        int d;
        d = (int'(tap_k) + 7) / 8 + 70;
        checks++;
        if (dout != hist[hist.size() - 1 - d]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d", t, tap_k);
        end
        if (d == 71) seen_min = 1;
        if (d == 100) seen_max = 1;
      end
    end
    checks++; if (!seen_min || !seen_max) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
