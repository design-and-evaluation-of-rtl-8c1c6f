// soc_ctrl: upset observability and program-return registers.
//
// Holds one TMR error counter per triplicated module and one ECC correction
// counter per ECC-protected module, so upsets can be told apart by module, as
// the document describes. A TMR counter adds one for every cycle in which the
// module's triplicated copies disagree (a single upset shows as one cycle, as
// it is corrected at the next edge); an ECC counter adds one per pulse of its
// correction input. Double errors from any source set a sticky flag, driven
// out on the dedicated de_o pin, and are counted. Software ends a program by
// writing its return value to RETURN: the value is kept for readout and the
// dedicated program-return pin ret_o goes high. Register map (this design's):
//   0x000 RETURN    return value; a write also sets ret_o
//   0x004 STATUS    bit0 ret_o, bit1 de_o; write 1 to clear
//   0x008 DE_CNT    double errors (write clears)
//   0x100+4i TMR_CNT[i]  (write clears)
//   0x200+4i ECC_CNT[i]  (write clears)
// Plain APB slave, zero wait states. Its own state is in a tmr_reg.
module soc_ctrl
  import triglav_pkg::*;
#(
  parameter int unsigned NTMR = 8,
  parameter int unsigned NECC = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  apb_req_t        apb_req_i,
  output apb_rsp_t        apb_rsp_o,
  input  logic [NTMR-1:0] tmr_err_i,
  input  logic [NECC-1:0] ecc_corr_i,
  input  logic            de_i,
  output logic            de_o,
  output logic            ret_o,
  output logic [31:0]     retval_o,
  output logic            tmr_err_o
);
  typedef struct packed {
    logic [31:0]            retval;
    logic                   ret;
    logic                   de;
    logic [31:0]            de_cnt;
    logic [NTMR-1:0][31:0]  tmr_cnt;
    logic [NECC-1:0][31:0]  ecc_cnt;
  } st_t;

  st_t s, n;
  tmr_reg #(.W($bits(st_t))) u_state (
    .clk, .rst_n, .d_i(n), .q_o(s), .q3_o(), .err_o(tmr_err_o)
  );

  logic       wr;
  logic [9:2] wa;
  assign wr = apb_req_i.psel && apb_req_i.penable && apb_req_i.pwrite;
  assign wa = apb_req_i.paddr[9:2];

  always_comb begin
    apb_rsp_o.pready  = 1'b1;
    apb_rsp_o.pslverr = 1'b0;
    apb_rsp_o.prdata  = '0;
    unique case (apb_req_i.paddr[9:8])
      2'd0: case (wa[7:2])
              6'd0: apb_rsp_o.prdata = s.retval;
              6'd1: apb_rsp_o.prdata = {30'd0, s.de, s.ret};
              6'd2: apb_rsp_o.prdata = s.de_cnt;
              default: ;
            endcase
      2'd1: if (32'(wa[7:2]) < NTMR) apb_rsp_o.prdata = s.tmr_cnt[wa[7:2]];
      2'd2: if (32'(wa[7:2]) < NECC) apb_rsp_o.prdata = s.ecc_cnt[wa[7:2]];
      default: ;
    endcase

    n = s;
    for (int i = 0; i < int'(NTMR); i++) if (tmr_err_i[i])  n.tmr_cnt[i] = s.tmr_cnt[i] + 1;
    for (int i = 0; i < int'(NECC); i++) if (ecc_corr_i[i]) n.ecc_cnt[i] = s.ecc_cnt[i] + 1;
    if (de_i) begin
      n.de     = 1'b1;
      n.de_cnt = s.de_cnt + 1;
    end
    if (wr) begin
      unique case (apb_req_i.paddr[9:8])
        2'd0: case (wa[7:2])
                6'd0: begin n.retval = apb_req_i.pwdata; n.ret = 1'b1; end
                6'd1: begin
                  if (apb_req_i.pwdata[0]) n.ret = 1'b0;
                  if (apb_req_i.pwdata[1]) n.de  = 1'b0;
                end
                6'd2: n.de_cnt = '0;
                default: ;
              endcase
        2'd1: if (32'(wa[7:2]) < NTMR) n.tmr_cnt[wa[7:2]] = '0;
        2'd2: if (32'(wa[7:2]) < NECC) n.ecc_cnt[wa[7:2]] = '0;
        default: ;
      endcase
    end
  end

  assign de_o     = s.de;
  assign ret_o    = s.ret;
  assign retval_o = s.retval;
endmodule
