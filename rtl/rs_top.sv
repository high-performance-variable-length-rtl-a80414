// rs_top: the variable-length eight-parallel RS codec, encoder and decoder
// side by side with their own ports.
//
// Both halves work on shortened RS(255,239) codewords (t = 8) selected by an
// 8-bit code_size = k (message symbols, 1..239) and move eight 8-bit symbols
// per clock, lane A (bits 63:56) first in time.
//
// Encoder: pulse enc_start (RSEST) with the first of ceil(k/8) message words;
// the systematic codeword (message, then P0..P15) comes out three clocks
// later on enc_dout, ceil((k+16)/8) words long.
//
// Decoder: pulse dec_start (RSDST) with the first of ceil((k+16)/8) received
// words; the corrected codeword comes out 71 + ceil(k/8) clocks later on
// dec_dout, with the error count and failure flag on its last word.
// dec_overrun reports a codeword that arrived before the wait time allowed.
//
// The pairing of encoder and decoder in one codec follows the document; the
// port names echo its timing charts (RSEST/UCWD/ECWD, RSDST/RCWD/CCWD).
module rs_top
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // encoder
  input  logic       enc_start,
  input  ksize_t     enc_code_size,
  input  sym8_t      enc_din,
  output sym8_t      enc_dout,
  output logic       enc_dout_valid,
  output logic       enc_dout_sop,
  output logic       enc_dout_eop,
  // decoder
  input  logic       dec_start,
  input  ksize_t     dec_code_size,
  input  sym8_t      dec_din,
  output sym8_t      dec_dout,
  output logic       dec_dout_valid,
  output logic       dec_dout_sop,
  output logic       dec_dout_eop,
  output logic [3:0] dec_errcnt,
  output logic       dec_fail,
  output logic       dec_overrun
);

  rs_encoder u_enc (
    .clk, .rst_n,
    .start(enc_start), .code_size(enc_code_size), .din(enc_din),
    .dout(enc_dout), .dout_valid(enc_dout_valid),
    .dout_sop(enc_dout_sop), .dout_eop(enc_dout_eop)
  );

  rs_decoder u_dec (
    .clk, .rst_n,
    .start(dec_start), .code_size(dec_code_size), .din(dec_din),
    .dout(dec_dout), .dout_valid(dec_dout_valid),
    .dout_sop(dec_dout_sop), .dout_eop(dec_dout_eop),
    .errcnt(dec_errcnt), .fail(dec_fail), .overrun(dec_overrun)
  );

endmodule
