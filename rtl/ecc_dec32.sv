// ecc_dec32: byte-level Hamming(13,8) decoder for one 52-bit codeword group.
//
// Decodes four 13-bit codewords independently. A single flipped bit in a byte
// is corrected and flagged in corrected_o[byte]; two flipped bits in a byte
// are flagged in double_err_o[byte] (a Double Error, not correctable), as the
// document describes for uncorrectable ECC errors. Purely combinational.
module ecc_dec32
  import triglav_pkg::*;
(
  input  logic [WORD_CW_W-1:0] cw_i,
  output logic [31:0]          data_o,
  output logic [3:0]           corrected_o,
  output logic [3:0]           double_err_o
);
  always_comb begin
    for (int unsigned b = 0; b < 4; b++) begin
      dec8_t r;
      r = ham13_dec(cw_i[CW_W*b +: CW_W]);
      data_o[8*b +: 8] = r.data;
      corrected_o[b]   = r.corrected;
      double_err_o[b]  = r.double_err;
    end
  end
endmodule
