// rs_decoder: variable-length eight-parallel Reed-Solomon decoder for the
// shortened RS(255,239) family (t = 8), 64 bits per clock.
//
// Structure: 8-parallel syndrome computation (with permutation) -> key
// equation solver (48 clocks) -> 8-parallel Chien search / Forney /
// correction, with the received words waiting in a FIFO whose tap is chosen
// by code_size. Each of the three stages has its own controller that carries
// the code_size of its codeword, so codewords of different lengths can be in
// flight together.
//
// Interface: pulse `start` (RSDST) with the first word of a codeword, give
// code_size = k (1..239) on that cycle and the ceil((k+16)/8) codeword words
// on consecutive cycles (lane A = first symbol, zero fill after the last
// symbol). The corrected codeword leaves in the same format, framed by
// dout_valid/dout_sop/dout_eop; errcnt and fail come with dout_eop.
//
// Latency: 71 + ceil(k/8) clocks from the first input word to the first
// corrected word (W + 16 syndrome clocks, 48 solver clocks, 5 correction
// clocks, W = ceil(k/8) + 2).
//
// Wait time: a codeword may follow the previous one directly only if both
// are of the same size. If the next codeword is shorter by d message words it
// must start d clocks later, so that corrected codewords never overlap, and
// two starts must be at least 16 clocks plus the size difference apart so the
// serial syndrome transfer is free. A source that always leaves 29 idle
// clocks (the largest size difference, 30 - 1 words) after each codeword
// satisfies every case. A violation raises the sticky `overrun` output.
//
// From the document: the block structure, code_size-steered stages, the
// latency 71 + ceil(k/8), the wait-time rule and the error count/fail
// outputs. This design's choices: the framing signals, the 4-bit error count
// and the overrun flag.
module rs_decoder
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,      // RSDST
  input  ksize_t     code_size,
  input  sym8_t      din,        // RCWD_A..H
  output sym8_t      dout,       // CCWD_A..H
  output logic       dout_valid,
  output logic       dout_sop,
  output logic       dout_eop,
  output logic [3:0] errcnt,     // ERRCNT
  output logic       fail,       // FAIL
  output logic       overrun
);

  // syndrome -> KES
  gf_t    syn;
  logic   syn_valid, syn_first;
  ksize_t syn_k;
  logic   ovr_syn;

  rs_syndrome u_syn (
    .clk, .rst_n, .start, .code_size, .din,
    .syn, .syn_valid, .syn_first, .syn_k, .overrun(ovr_syn)
  );

  // KES -> Chien/Forney
  gf_t    sigma [T_CORR+1];
  gf_t    omega [T_CORR];
  logic   kes_valid;
  ksize_t kes_k;
  logic   ovr_kes;

  rs_kes u_kes (
    .clk, .rst_n, .syn, .syn_valid, .syn_first, .syn_k,
    .sigma, .omega, .kes_valid, .kes_k, .overrun(ovr_kes)
  );

  // input word counter (the FIFO stores only codeword words)
  logic       busy_in;
  logic [5:0] in_left_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_left_q <= '0;
    else if (start) in_left_q <= msg_words(code_size) + 6'(NPAR / LANES) - 6'd1;
    else if (in_left_q != 0) in_left_q <= in_left_q - 6'd1;
  end
  assign busy_in = (in_left_q != 0);

  // FIFO
  ksize_t fifo_k;
  sym8_t  rx;

  rs_fifo u_fifo (
    .clk, .rst_n, .din(start || busy_in ? din : '0), .tap_k(fifo_k), .dout(rx)
  );

  logic ovr_cf;

  rs_chien_forney u_cf (
    .clk, .rst_n, .sigma, .omega, .kes_valid, .kes_k,
    .fifo_k, .rx,
    .dout, .dout_valid, .dout_sop, .dout_eop, .errcnt, .fail,
    .overrun(ovr_cf)
  );

  logic ovr_in;
  assign ovr_in = start && busy_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overrun <= 1'b0;
    else if (ovr_in || ovr_syn || ovr_kes || ovr_cf) overrun <= 1'b1;
  end

endmodule
