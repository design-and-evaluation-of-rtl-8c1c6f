// gpio: general-purpose I/O register block.
//
// The document only names a GPIO peripheral; this is the plain form. Each of
// the N pins has an output value and an output enable; inputs pass a
// two-flop synchroniser before software reads them. irq_o is high while any
// input bit selected in IE is high. Registers (plain APB, zero wait states):
//   0x00 OUT, 0x04 OE, 0x08 IN (read only), 0x0C IE
// Pin count is this design's choice. State is held in a tmr_reg.
module gpio
  import triglav_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  apb_req_t     apb_req_i,
  output apb_rsp_t     apb_rsp_o,
  input  logic [N-1:0] gpio_i,
  output logic [N-1:0] gpio_o,
  output logic [N-1:0] gpio_oe_o,
  output logic         irq_o,
  output logic         tmr_err_o
);
  typedef struct packed {
    logic [N-1:0] out;
    logic [N-1:0] oe;
    logic [N-1:0] ie;
    logic [N-1:0] sync1;
    logic [N-1:0] sync2;
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
    case (apb_req_i.paddr[3:2])
      2'd0: apb_rsp_o.prdata = 32'(s.out);
      2'd1: apb_rsp_o.prdata = 32'(s.oe);
      2'd2: apb_rsp_o.prdata = 32'(s.sync2);
      default: apb_rsp_o.prdata = 32'(s.ie);
    endcase

    n       = s;
    n.sync1 = gpio_i;
    n.sync2 = s.sync1;
    if (wr) begin
      case (apb_req_i.paddr[3:2])
        2'd0: n.out = apb_req_i.pwdata[N-1:0];
        2'd1: n.oe  = apb_req_i.pwdata[N-1:0];
        2'd3: n.ie  = apb_req_i.pwdata[N-1:0];
        default: ;
      endcase
    end
  end

  assign gpio_o    = s.out;
  assign gpio_oe_o = s.oe;
  assign irq_o     = (s.sync2 & s.ie) != 0;
endmodule
