// sram_dp: dual-port synchronous SRAM, the storage of one MSPU.
//
// Models the foundry dual-port macro at the logic level as an array of DEPTH
// words of W bits. Both ports can read or write in the same cycle; each write
// has one enable bit per LANE-bit lane (one lane per 13-bit ECC byte), so a
// byte write does not need a read-modify-write. Reads are synchronous: data
// appears the cycle after the address. When both ports write the same word in
// the same cycle, port A wins (the macro's behaviour is not known; the MSPU
// never lets this happen). The size, 32 kB of data as 8192 words, is the
// document's; the lane enables and the collision rule are this design's.
module sram_dp #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned LANE  = 13,
  parameter int unsigned NLANE = 4,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                  clk,
  // port A
  input  logic                  a_en,
  input  logic                  a_we,
  input  logic [NLANE-1:0]      a_be,
  input  logic [AW-1:0]         a_addr,
  input  logic [LANE*NLANE-1:0] a_wdata,
  output logic [LANE*NLANE-1:0] a_rdata,
  // port B
  input  logic                  b_en,
  input  logic                  b_we,
  input  logic [NLANE-1:0]      b_be,
  input  logic [AW-1:0]         b_addr,
  input  logic [LANE*NLANE-1:0] b_wdata,
  output logic [LANE*NLANE-1:0] b_rdata
);
  logic [LANE*NLANE-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we)
      for (int l = 0; l < int'(NLANE); l++)
        if (b_be[l]) mem[b_addr][LANE*l +: LANE] <= b_wdata[LANE*l +: LANE];
    if (a_en && a_we)
      for (int l = 0; l < int'(NLANE); l++)
        if (a_be[l]) mem[a_addr][LANE*l +: LANE] <= a_wdata[LANE*l +: LANE];
  end

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end
endmodule
