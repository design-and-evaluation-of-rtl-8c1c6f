// tb_apb_regs: behavioural plain-APB register file for testbenches.
//
// 16 registers of 32 bits at word addresses 0x00..0x3C, reset to zero. With
// WAIT = 1 the access phase lasts a random one to three cycles (pready low in
// between); address 0x40 and above answers with pslverr.
module tb_apb_regs
  import triglav_pkg::*;
#(
  parameter bit WAIT = 0
) (
  input  logic     clk,
  input  apb_req_t req_i,
  output apb_rsp_t rsp_o
);
  logic [31:0] regs [16];
  int          cnt = 0;
  int          nwait = 0;
  logic        rdy;

  initial for (int i = 0; i < 16; i++) regs[i] = '0;

  assign rdy = !WAIT || cnt >= nwait;

  always_comb begin
    rsp_o.pready  = rdy;
    rsp_o.pslverr = req_i.paddr >= 12'h040;
    rsp_o.prdata  = regs[req_i.paddr[5:2]];
  end

  always @(posedge clk) begin
    if (req_i.psel && !req_i.penable) begin
      cnt   <= 0;
      nwait <= $urandom_range(0, 2);
    end else if (req_i.psel && req_i.penable) begin
      cnt <= cnt + 1;
      if (rdy && req_i.pwrite && req_i.paddr < 12'h040) regs[req_i.paddr[5:2]] <= req_i.pwdata;
    end
  end
endmodule
