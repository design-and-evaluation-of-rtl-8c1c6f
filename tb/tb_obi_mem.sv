// tb_obi_mem: behavioural OBI memory slave for testbenches.
//
// 1024 words, indexed by address bits [11:2], with byte enables. With
// SLOW = 0 it grants every request and answers on the next cycle, like an
// SRAM. With SLOW = 1 it takes one transaction at a time, grants at random
// and answers one to three cycles after the grant, which exercises stalls.
// Memory starts as all zeros.
module tb_obi_mem
  import triglav_pkg::*;
#(
  parameter bit SLOW = 0
) (
  input  logic     clk,
  input  obi_req_t req_i,
  output obi_rsp_t rsp_o
);
  logic [31:0] mem [1024];
  logic        busy = 0;
  int          wait_cyc = 0;
  logic        gnt_en = 1;
  logic [31:0] rdata_q = 0;
  logic        rvalid_q = 0;

  initial for (int i = 0; i < 1024; i++) mem[i] = '0;

  always_comb begin
    rsp_o.gnt    = req_i.req && gnt_en && !busy;
    rsp_o.rvalid = rvalid_q;
    rsp_o.rdata  = rdata_q;
    rsp_o.err    = 1'b0;
  end

  always @(posedge clk) begin
    rvalid_q <= 1'b0;
    if (SLOW) gnt_en <= $urandom_range(0, 2) != 0;
    if (busy) begin
      if (wait_cyc == 0) begin
        busy     <= 1'b0;
        rvalid_q <= 1'b1;
      end else wait_cyc <= wait_cyc - 1;
    end
    if (rsp_o.gnt) begin
      if (req_i.we) begin
        for (int b = 0; b < 4; b++)
          if (req_i.be[b]) mem[req_i.addr[11:2]][8*b +: 8] <= req_i.wdata[8*b +: 8];
        rdata_q <= '0;
      end else rdata_q <= mem[req_i.addr[11:2]];
      if (SLOW) begin
        busy     <= 1'b1;
        wait_cyc <= $urandom_range(0, 2);
      end else rvalid_q <= 1'b1;
    end
  end
endmodule
