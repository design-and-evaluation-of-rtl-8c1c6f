// tb_ecc: exhaustive check of the byte-level Hamming(13,8) encoder and decoder.
//
// For every byte value, the encoder output is compared with parity equations
// written out here by hand (positions 1,2,4,8 of a Hamming(12,8) code plus an
// overall parity bit). The decoder must return the byte unchanged for a clean
// codeword, repair every single-bit flip (13 per byte) and flag every
// two-bit flip (78 per byte) as a double error. The four byte lanes of the
// 32-bit word are exercised at once with different values.
module tb_ecc;
  import triglav_pkg::*;

  logic [31:0] data, dout;
  logic [51:0] cw, cw_bad;
  logic [3:0]  corr, de;
  int checks = 0, failures = 0;

  ecc_enc32 u_enc (.data_i(data), .cw_o(cw));
  ecc_dec32 u_dec (.cw_i(cw_bad), .data_o(dout), .corrected_o(corr), .double_err_o(de));

  function automatic logic [12:0] ref_enc(logic [7:0] d);
    logic [12:0] c;
    c = '0;
    c[2] = d[0]; c[4] = d[1]; c[5] = d[2]; c[6] = d[3];
    c[8] = d[4]; c[9] = d[5]; c[10] = d[6]; c[11] = d[7];
    c[0] = d[0] ^ d[1] ^ d[3] ^ d[4] ^ d[6];
    c[1] = d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
    c[3] = d[1] ^ d[2] ^ d[3] ^ d[7];
    c[7] = d[4] ^ d[5] ^ d[6] ^ d[7];
    c[12] = ^c[11:0];
    return c;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s data=%h cw=%h bad=%h dout=%h corr=%b de=%b", what, data, cw, cw_bad, dout, corr, de);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      data = {8'(v), 8'(v ^ 8'h5A), 8'(255 - v), 8'(v * 7)};
      #1;
      for (int b = 0; b < 4; b++) check(cw[13*b +: 13] == ref_enc(data[8*b +: 8]), "encode");
      cw_bad = cw;
      #1;
      check(dout == data && corr == 0 && de == 0, "clean");
      for (int i = 0; i < 13; i++) begin
        // one flip in every byte lane at once: each must be repaired
        cw_bad = cw;
        for (int b = 0; b < 4; b++) cw_bad[13*b + ((i + b) % 13)] ^= 1'b1;
        #1;
        check(dout == data && corr == 4'hF && de == 0, "single");
        for (int j = i + 1; j < 13; j++) begin
          cw_bad = cw;
          cw_bad[13 + i] ^= 1'b1;
          cw_bad[13 + j] ^= 1'b1;
          #1;
          check(de == 4'b0010 && dout[7:0] == data[7:0] && dout[31:16] == data[31:16], "double");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
