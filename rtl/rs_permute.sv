// rs_permute: code-size controlled permutation for the eight-parallel
// encoder and syndrome blocks.
//
// A codeword (or message) arrives as consecutive 8-symbol words starting on
// the cycle `start` is high, first symbol in lane A; when its length is not a
// multiple of eight the last word is completed with zeros at the end. The
// parallel polynomial evaluators, however, want the highest-degree word to be
// padded at the *front*. This block inserts z = (8 - k mod 8) mod 8 zero
// symbols ahead of the first symbol: output word j, lane l takes input word j,
// lane l-z when l >= z, and otherwise lane l-z+8 of the previous input word,
// which is held in one register per lane. With z = 3 this is the RS(237,221)
// example: the first word carries three zeros and symbols 1..5.
//
// The word count is ceil(k/8) + EXTRA_WORDS (EXTRA_WORDS = 0 for a message,
// 2 for a codeword with its 16 parity symbols). A control counter started by
// `start` marks the permuted words; the input must hold those words on
// consecutive cycles. Output is registered: latency one clock. pw_first and
// pw_last flag the first and last permuted word.
//
// Follows the permutation of the encoder and syndrome figures; the exact
// handshake (start pulse, consecutive words) is this design's choice.
module rs_permute
  import rs_pkg::*;
#(
  parameter int unsigned EXTRA_WORDS = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,      // high with the first word of a codeword
  input  ksize_t code_size,  // k, sampled with start
  input  sym8_t  din,
  output sym8_t  pw,         // permuted word
  output logic   pw_valid,
  output logic   pw_first,
  output logic   pw_last
);

  sym8_t      prev_q;
  logic [2:0] z_q;
  logic [5:0] left_q;         // words still to come after the current one
  logic       busy_q;

  logic [2:0] z_cur;
  logic [5:0] nwords;
  logic       active;
  sym8_t      perm;

  assign z_cur  = start ? pad_zeros(code_size) : z_q;
  assign nwords = msg_words(code_size) + 6'(EXTRA_WORDS);
  assign active = start || busy_q;

  always_comb begin
    sym8_t p;
    for (int l = 0; l < LANES; l++) begin
      if (l >= int'(z_cur)) p[l] = din[l - int'(z_cur)];
      else                  p[l] = start ? 8'h00 : prev_q[l - int'(z_cur) + LANES];
    end
    perm = p;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q   <= '0;
      z_q      <= '0;
      left_q   <= '0;
      busy_q   <= 1'b0;
      pw       <= '0;
      pw_valid <= 1'b0;
      pw_first <= 1'b0;
      pw_last  <= 1'b0;
    end else begin
      pw_valid <= active;
      pw_first <= start;
      pw       <= active ? perm : '0;
      prev_q   <= din;
      if (start) begin
        z_q     <= pad_zeros(code_size);
        left_q  <= nwords - 6'd1;
        busy_q  <= (nwords > 6'd1);
        pw_last <= (nwords == 6'd1);
      end else if (busy_q) begin
        left_q  <= left_q - 6'd1;
        busy_q  <= (left_q > 6'd1);
        pw_last <= (left_q == 6'd1);
      end else begin
        pw_last <= 1'b0;
      end
    end
  end

endmodule
