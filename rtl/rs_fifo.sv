// rs_fifo: received-word buffer with a code_size-selected output tap.
//
// Every clock the 64-bit input word is written into a circular memory of
// DEPTH words, so the memory behaves as a delay line. The output multiplexer,
// steered by code_size, reads the word written ceil(k/8) + BASE_DELAY clocks
// earlier: the decoder's latency grows with the message length, and the tap
// follows it so that each received word meets its error value in the
// correction adder. tap_k is the code_size of the word being read (given by
// the error correction block), so codewords of different sizes can be in
// flight at once. DEPTH must exceed the longest delay, BASE_DELAY + 30.
//
// Interface: din every clock (zero when idle), dout combinational from the
// memory. Timing: dout in cycle t + ceil(tap_k/8) + BASE_DELAY equals din of
// cycle t.
//
// From the document: a 64-bit wide buffer whose output is chosen by a
// code_size-driven multiplexer among a range of taps. This design's choices:
// the delay values, which follow the decoder pipeline here (the taps cover
// delays of 71..100 clocks), and hence the depth of 101 words.
module rs_fifo
  import rs_pkg::*;
#(
  parameter int unsigned BASE_DELAY = 70,
  parameter int unsigned DEPTH      = BASE_DELAY + C_MAX + 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  sym8_t  din,
  input  ksize_t tap_k,
  output sym8_t  dout
);

  localparam int unsigned AW = $clog2(DEPTH);

  sym8_t         mem [DEPTH];
  logic [AW-1:0] wp_q;
  logic [AW-1:0] rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wp_q <= '0;
    else        wp_q <= (wp_q == AW'(DEPTH - 1)) ? '0 : wp_q + 1'b1;
  end

  always_ff @(posedge clk) mem[wp_q] <= din;

  // control block: read address = write address - delay (mod DEPTH)
  logic [AW:0] dly, sum;
  always_comb begin
    dly = (AW+1)'(msg_words(tap_k)) + (AW+1)'(BASE_DELAY);
    sum = (AW+1)'(wp_q) + (AW+1)'(DEPTH) - dly;     // in 1 .. 2*DEPTH-1
    rd  = (sum >= (AW+1)'(DEPTH)) ? AW'(sum - (AW+1)'(DEPTH)) : AW'(sum);
  end

  assign dout = mem[rd];

  initial begin
    assert (DEPTH > BASE_DELAY + C_MAX)
      else $error("rs_fifo: DEPTH too small for the longest delay");
  end

endmodule
