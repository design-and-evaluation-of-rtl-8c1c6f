// plic: platform-level interrupt controller (one target, the CPU).
//
// The document only names the PLIC and "interrupt control"; this is a minimal
// form. A rising edge on source i sets pending bit i. irq_o is high while any
// pending source is enabled. Reading CLAIM returns the number (i+1) of the
// lowest enabled pending source, or 0 if none, and clears that pending bit;
// priorities and thresholds are left out. Registers (plain APB, zero wait):
//   0x00 PENDING (read only), 0x04 ENABLE, 0x08 CLAIM (read)
// State is held in a tmr_reg.
module plic
  import triglav_pkg::*;
#(
  parameter int unsigned NSRC = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  apb_req_t        apb_req_i,
  output apb_rsp_t        apb_rsp_o,
  input  logic [NSRC-1:0] src_i,
  output logic            irq_o,
  output logic            tmr_err_o
);
  typedef struct packed {
    logic [NSRC-1:0] pend;
    logic [NSRC-1:0] en;
    logic [NSRC-1:0] last;
  } st_t;

  st_t s, n;
  tmr_reg #(.W($bits(st_t))) u_state (
    .clk, .rst_n, .d_i(n), .q_o(s), .q3_o(), .err_o(tmr_err_o)
  );

  logic            acc, wr;
  logic [31:0]     claim_id;
  logic [NSRC-1:0] act;
  assign acc = apb_req_i.psel && apb_req_i.penable;
  assign wr  = acc && apb_req_i.pwrite;

  always_comb begin
    act      = s.pend & s.en;
    claim_id = '0;
    for (int i = int'(NSRC) - 1; i >= 0; i--) if (act[i]) claim_id = 32'(i + 1);

    apb_rsp_o.pready  = 1'b1;
    apb_rsp_o.pslverr = 1'b0;
    case (apb_req_i.paddr[3:2])
      2'd0:    apb_rsp_o.prdata = 32'(s.pend);
      2'd1:    apb_rsp_o.prdata = 32'(s.en);
      2'd2:    apb_rsp_o.prdata = claim_id;
      default: apb_rsp_o.prdata = '0;
    endcase

    n      = s;
    n.last = src_i;
    n.pend = s.pend | (src_i & ~s.last);
    if (acc && !apb_req_i.pwrite && apb_req_i.paddr[3:2] == 2'd2 && claim_id != 0)
      n.pend[claim_id - 1] = 1'b0;
    if (wr && apb_req_i.paddr[3:2] == 2'd1) n.en = apb_req_i.pwdata[NSRC-1:0];
  end

  assign irq_o = act != 0;
endmodule
