// ecc_enc32: byte-level Hamming(13,8) encoder for one 32-bit word.
//
// Each byte of the word is encoded on its own into a 13-bit SEC-DED codeword
// (8 data bits, 4 Hamming parity bits, 1 overall parity bit), so a 32-bit word
// becomes 52 bits and up to four single-bit errors can be repaired, one per
// byte. Byte-level coding is what the document specifies; the bit order inside
// a codeword is this design's (see triglav_pkg). Purely combinational.
module ecc_enc32
  import triglav_pkg::*;
(
  input  logic [31:0]          data_i,
  output logic [WORD_CW_W-1:0] cw_o
);
  always_comb cw_o = ecc_enc_word(data_i);
endmodule
