// apb_rt_bridge: OBI slave to APB-RT (radiation-tolerant APB) master.
//
// The APB-RT is the peripheral bus of the SoC. As the document specifies, its
// control signals are triplicated and its address and data are protected by
// byte-level Hamming(13,8) ECC. This bridge accepts one OBI request at a time,
// encodes the address and write data, and runs an APB setup phase and an
// access phase that lasts until the (voted) pready. The read data coming back
// is decoded; a single error per byte is corrected and counted, a double error
// turns into an OBI error response. The three copies of psel, penable and
// pwrite come from the three voted outputs of the bridge's tmr_reg, so each
// copy has its own voter, as in full TMR.
//
// Peripheral selection: NSLV slots of 4 KiB, slot = addr[14:12]. Timing: gnt
// in the idle cycle, then setup, access (one or more cycles) and the OBI
// response one cycle after pready: 4 cycles for a zero-wait peripheral. The
// APB has no byte strobes here (whole-word writes). Slot layout, timing and
// the handling of byte enables are this design's choices.
module apb_rt_bridge
  import triglav_pkg::*;
#(
  parameter int unsigned NSLV = APB_NSLV
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  obi_req_t              obi_req_i,
  output obi_rsp_t              obi_rsp_o,
  output apbrt_req_t [NSLV-1:0] apb_req_o,
  input  apbrt_rsp_t [NSLV-1:0] apb_rsp_i,
  output logic                  ecc_corr_o,  // read data byte corrected
  output logic                  ecc_de_o,    // read data double error
  output logic                  tmr_err_o
);
  localparam int unsigned SLW = (NSLV > 1) ? $clog2(NSLV) : 1;

  typedef enum logic [1:0] {IDLE, SETUP, ACCESS, RESP} state_e;

  typedef struct packed {
    state_e        st;
    logic [SLW-1:0] slot;
    logic          we;
    logic [31:0]   addr;
    logic [31:0]   wdata;
    logic [31:0]   rdata;
    logic          err;
  } st_t;

  st_t s, n;
  logic [2:0][$bits(st_t)-1:0] s3;
  tmr_reg #(.W($bits(st_t))) u_state (
    .clk, .rst_n, .d_i(n), .q_o(s), .q3_o(s3), .err_o(tmr_err_o)
  );

  logic [WORD_CW_W-1:0] addr_cw, wdata_cw;
  ecc_enc32 u_enc_addr  (.data_i(s.addr),  .cw_o(addr_cw));
  ecc_enc32 u_enc_wdata (.data_i(s.wdata), .cw_o(wdata_cw));

  // voted copies of the state
  st_t sc [3];
  always_comb for (int c = 0; c < 3; c++) sc[c] = st_t'(s3[c]);

  always_comb begin
    for (int k = 0; k < int'(NSLV); k++) begin
      apb_req_o[k].paddr  = addr_cw;
      apb_req_o[k].pwdata = wdata_cw;
      for (int c = 0; c < 3; c++) begin
        apb_req_o[k].psel[c]    = (sc[c].st == SETUP || sc[c].st == ACCESS) && sc[c].slot == SLW'(k);
        apb_req_o[k].penable[c] = sc[c].st == ACCESS;
        apb_req_o[k].pwrite[c]  = sc[c].we;
      end
    end
  end

  // selected response
  apbrt_rsp_t sel_rsp;
  logic       rdy, serr;
  logic [31:0] rdata;
  logic [3:0]  rcorr, rde;
  always_comb begin
    sel_rsp = apb_rsp_i[s.slot];
    rdy     = maj3(sel_rsp.pready[0], sel_rsp.pready[1], sel_rsp.pready[2]);
    serr    = maj3(sel_rsp.pslverr[0], sel_rsp.pslverr[1], sel_rsp.pslverr[2]);
  end
  ecc_dec32 u_dec_rdata (.cw_i(sel_rsp.prdata), .data_o(rdata), .corrected_o(rcorr), .double_err_o(rde));

  logic capture;
  always_comb begin
    capture    = s.st == ACCESS && rdy;
    ecc_corr_o = capture && !s.we && rcorr != 0;
    ecc_de_o   = capture && !s.we && rde != 0;

    obi_rsp_o.gnt    = s.st == IDLE && obi_req_i.req;
    obi_rsp_o.rvalid = s.st == RESP;
    obi_rsp_o.rdata  = s.rdata;
    obi_rsp_o.err    = s.err;

    n = s;
    unique case (s.st)
      IDLE: if (obi_req_i.req) begin
        n.st    = SETUP;
        n.slot  = SLW'(obi_req_i.addr[14:12]);
        n.we    = obi_req_i.we;
        n.addr  = obi_req_i.addr;
        n.wdata = obi_req_i.wdata;
        if (32'(obi_req_i.addr[14:12]) >= NSLV) begin
          n.st  = RESP;   // no such peripheral
          n.err = 1'b1;
          n.rdata = '0;
        end
      end
      SETUP:  n.st = ACCESS;
      ACCESS: if (rdy) begin
        n.st    = RESP;
        n.rdata = s.we ? 32'd0 : rdata;
        n.err   = serr || (!s.we && rde != 0);
      end
      RESP: begin
        n.st  = IDLE;
        n.err = 1'b0;
      end
      default: n.st = IDLE;
    endcase
  end
endmodule
