// timer: 32-bit timer with prescaler and compare interrupt (TIMER0/TIMER1).
//
// The document only names the two timers; this is the simplest timer that
// serves a microcontroller. When enabled, the counter advances once every
// PRESC+1 cycles. When it reaches CMP the match flag is set (and the counter
// restarts from 0 if auto-reload is on); irq_o is the flag gated by the
// interrupt enable. Registers (plain APB, zero wait states):
//   0x00 CTRL   bit0 enable, bit1 auto-reload, bit2 interrupt enable
//   0x04 PRESC  prescaler
//   0x08 COUNT  counter (writable)
//   0x0C CMP    compare value
//   0x10 STATUS bit0 match flag, write 1 to clear
// State is held in a tmr_reg.
module timer
  import triglav_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req_i,
  output apb_rsp_t apb_rsp_o,
  output logic     irq_o,
  output logic     tmr_err_o
);
  typedef struct packed {
    logic [2:0]  ctrl;
    logic [31:0] presc;
    logic [31:0] pcnt;
    logic [31:0] count;
    logic [31:0] cmp;
    logic        flag;
  } st_t;

  st_t s, n;
  tmr_reg #(.W($bits(st_t))) u_state (
    .clk, .rst_n, .d_i(n), .q_o(s), .q3_o(), .err_o(tmr_err_o)
  );

  logic wr;
  assign wr = apb_req_i.psel && apb_req_i.penable && apb_req_i.pwrite;

  always_comb begin
    apb_rsp_o.pready  = 1'b1;
    apb_rsp_o.pslverr = 1'b0;
    case (apb_req_i.paddr[4:2])
      3'd0:    apb_rsp_o.prdata = 32'(s.ctrl);
      3'd1:    apb_rsp_o.prdata = s.presc;
      3'd2:    apb_rsp_o.prdata = s.count;
      3'd3:    apb_rsp_o.prdata = s.cmp;
      3'd4:    apb_rsp_o.prdata = 32'(s.flag);
      default: apb_rsp_o.prdata = '0;
    endcase

    n = s;
    if (s.ctrl[0]) begin
      if (s.pcnt >= s.presc) begin
        n.pcnt  = '0;
        n.count = s.count + 1;
        if (s.count + 1 == s.cmp) begin
          n.flag = 1'b1;
          if (s.ctrl[1]) n.count = '0;
        end
      end else n.pcnt = s.pcnt + 1;
    end
    if (wr) begin
      case (apb_req_i.paddr[4:2])
        3'd0: n.ctrl  = apb_req_i.pwdata[2:0];
        3'd1: begin n.presc = apb_req_i.pwdata; n.pcnt = '0; end
        3'd2: n.count = apb_req_i.pwdata;
        3'd3: n.cmp   = apb_req_i.pwdata;
        3'd4: if (apb_req_i.pwdata[0]) n.flag = 1'b0;
        default: ;
      endcase
    end
  end

  assign irq_o = s.flag && s.ctrl[2];
endmodule
