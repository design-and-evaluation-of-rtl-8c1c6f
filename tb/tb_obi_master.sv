// tb_obi_master: behavioural OBI master for testbenches.
//
// Stands in for a bus master that is not part of the RTL (a CPU port, the
// debug unit). xfer() raises a request on a falling clock edge, holds it until
// it is granted, waits for the response and returns read data and the err
// bit. One transfer at a time.
module tb_obi_master
  import triglav_pkg::*;
(
  input  logic     clk,
  output obi_req_t req_o,
  input  obi_rsp_t rsp_i
);
  initial req_o = '0;

  task automatic xfer(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                      output logic [31:0] rdata, output logic err);
    @(negedge clk);
    req_o = '{req: 1'b1, we: we, be: 4'hF, addr: addr, wdata: wdata};
    @(posedge clk);
    while (!rsp_i.gnt) @(posedge clk);
    @(negedge clk);
    req_o = '0;
    while (!rsp_i.rvalid) @(negedge clk);
    rdata = rsp_i.rdata;
    err   = rsp_i.err;
  endtask

  task automatic wr(input logic [31:0] addr, input logic [31:0] wdata);
    logic [31:0] d;
    logic        e;
    xfer(1'b1, addr, wdata, d, e);
  endtask
endmodule
