// apbrt_slv: peripheral end of the APB-RT bus.
//
// Turns the protected APB-RT bus into a plain APB port for one peripheral.
// The three copies of psel, penable and pwrite are majority-voted; the
// Hamming(13,8)-encoded address and write data are decoded, repairing one
// flipped bit per byte. If a byte of the address or of write data holds a
// double error, the access is not passed on: the peripheral sees no psel and
// the bus gets pready with pslverr. The read data is encoded and pready and
// pslverr are driven as three copies. ecc_corr_o and ecc_de_o pulse in the
// access cycle for the module's ECC counters. Purely combinational, so it
// adds no cycle. The triplicated control and ECC-protected address and data
// are the document's; the error policy is this design's.
module apbrt_slv
  import triglav_pkg::*;
(
  input  apbrt_req_t rt_req_i,
  output apbrt_rsp_t rt_rsp_o,
  output apb_req_t   apb_req_o,
  input  apb_rsp_t   apb_rsp_i,
  output logic       ecc_corr_o,
  output logic       ecc_de_o
);
  logic        sel, en, wr;
  logic [31:0] addr, wdata;
  logic [3:0]  acorr, ade, wcorr, wde;

  ecc_dec32 u_dec_addr  (.cw_i(rt_req_i.paddr),  .data_o(addr),  .corrected_o(acorr), .double_err_o(ade));
  ecc_dec32 u_dec_wdata (.cw_i(rt_req_i.pwdata), .data_o(wdata), .corrected_o(wcorr), .double_err_o(wde));

  logic [WORD_CW_W-1:0] rdata_cw;
  ecc_enc32 u_enc_rdata (.data_i(apb_rsp_i.prdata), .cw_o(rdata_cw));

  logic bad, access;
  always_comb begin
    sel    = maj3(rt_req_i.psel[0],    rt_req_i.psel[1],    rt_req_i.psel[2]);
    en     = maj3(rt_req_i.penable[0], rt_req_i.penable[1], rt_req_i.penable[2]);
    wr     = maj3(rt_req_i.pwrite[0],  rt_req_i.pwrite[1],  rt_req_i.pwrite[2]);
    bad    = (ade != 0) || (wr && wde != 0);
    access = sel && en;

    apb_req_o.psel    = sel && !bad;
    apb_req_o.penable = en;
    apb_req_o.pwrite  = wr;
    apb_req_o.paddr   = addr[11:0];
    apb_req_o.pwdata  = wdata;

    rt_rsp_o.prdata  = rdata_cw;
    rt_rsp_o.pready  = {3{bad ? 1'b1 : apb_rsp_i.pready}};
    rt_rsp_o.pslverr = {3{bad ? 1'b1 : apb_rsp_i.pslverr}};

    ecc_corr_o = access && ((acorr & ~ade) != 0 || (wr && (wcorr & ~wde) != 0));
    ecc_de_o   = access && bad;
  end
endmodule
