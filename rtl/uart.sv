// uart: UART transmitter and receiver, 8 data bits, no parity, 1 stop bit.
//
// The document names a UART among the SoC's interfaces; frame format, baud
// divisor and buffering are this design's. One bit lasts DIV+1 clock cycles.
// The transmitter sends the byte written to TXDATA when it is idle. The
// receiver synchronises rx_i with two flops, waits for a falling edge, checks
// the start bit half a bit later and then samples each data bit in its
// middle; a received byte sets RX valid (overrun if the previous one was not
// read). Registers (plain APB, zero wait states):
//   0x00 TXDATA (write starts transmission, ignored while busy)
//   0x04 RXDATA (read returns the byte and clears RX valid)
//   0x08 STATUS bit0 tx busy, bit1 rx valid, bit2 rx overrun (write 1 clears)
//   0x0C DIV    cycles per bit minus one (reset value DIV_RST)
// irq_o is high while RX valid. State is held in a tmr_reg.
module uart
  import triglav_pkg::*;
#(
  parameter logic [15:0] DIV_RST = 16'd2169   // 115200 baud at 250 MHz
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req_i,
  output apb_rsp_t apb_rsp_o,
  output logic     tx_o,
  input  logic     rx_i,
  output logic     irq_o,
  output logic     tmr_err_o
);
  typedef struct packed {
    logic [15:0] div;
    // transmitter
    logic        tx_busy;
    logic [9:0]  tx_sh;     // stop, data[7:0], start; LSB goes out first
    logic [3:0]  tx_bits;
    logic [15:0] tx_cnt;
    logic        tx_line;
    // receiver
    logic        rx_s1, rx_s2;
    logic        rx_busy;
    logic [3:0]  rx_bits;   // 0: start bit, 1..8 data, 9 stop
    logic [15:0] rx_cnt;
    logic [7:0]  rx_sh;
    logic [7:0]  rx_data;
    logic        rx_valid;
    logic        rx_ovr;
  } st_t;

  localparam st_t RST = '{div: DIV_RST, tx_line: 1'b1, rx_s1: 1'b1, rx_s2: 1'b1, default: '0};

  st_t s, n;
  tmr_reg #(.W($bits(st_t)), .RST(RST)) u_state (
    .clk, .rst_n, .d_i(n), .q_o(s), .q3_o(), .err_o(tmr_err_o)
  );

  logic acc, wr;
  assign acc = apb_req_i.psel && apb_req_i.penable;
  assign wr  = acc && apb_req_i.pwrite;

  always_comb begin
    apb_rsp_o.pready  = 1'b1;
    apb_rsp_o.pslverr = 1'b0;
    case (apb_req_i.paddr[3:2])
      2'd0:    apb_rsp_o.prdata = '0;
      2'd1:    apb_rsp_o.prdata = 32'(s.rx_data);
      2'd2:    apb_rsp_o.prdata = {29'd0, s.rx_ovr, s.rx_valid, s.tx_busy};
      default: apb_rsp_o.prdata = 32'(s.div);
    endcase

    n       = s;
    n.rx_s1 = rx_i;
    n.rx_s2 = s.rx_s1;

    // transmitter
    if (s.tx_busy) begin
      if (s.tx_cnt == s.div) begin
        n.tx_cnt = '0;
        if (s.tx_bits == 4'd9) begin
          n.tx_busy = 1'b0;
          n.tx_line = 1'b1;
        end else begin
          n.tx_bits = s.tx_bits + 1;
          n.tx_sh   = {1'b1, s.tx_sh[9:1]};
          n.tx_line = s.tx_sh[1];
        end
      end else n.tx_cnt = s.tx_cnt + 1;
    end else if (wr && apb_req_i.paddr[3:2] == 2'd0) begin
      n.tx_busy = 1'b1;
      n.tx_sh   = {1'b1, apb_req_i.pwdata[7:0], 1'b0};
      n.tx_bits = '0;
      n.tx_cnt  = '0;
      n.tx_line = 1'b0;
    end

    // receiver
    if (!s.rx_busy) begin
      if (!s.rx_s2) begin
        n.rx_busy = 1'b1;
        n.rx_bits = '0;
        n.rx_cnt  = '0;
      end
    end else begin
      // sample at half a bit for the start bit, then every full bit
      if ((s.rx_bits == 0 && s.rx_cnt == (s.div >> 1)) || (s.rx_bits != 0 && s.rx_cnt == s.div)) begin
        n.rx_cnt = '0;
        if (s.rx_bits == 0) begin
          if (s.rx_s2) n.rx_busy = 1'b0;        // glitch, not a start bit
          else         n.rx_bits = 4'd1;
        end else if (s.rx_bits == 4'd9) begin
          n.rx_busy = 1'b0;
          if (s.rx_s2) begin                    // valid stop bit
            n.rx_data  = s.rx_sh;
            n.rx_ovr   = s.rx_ovr | s.rx_valid;
            n.rx_valid = 1'b1;
          end
        end else begin
          n.rx_sh   = {s.rx_s2, s.rx_sh[7:1]};
          n.rx_bits = s.rx_bits + 1;
        end
      end else n.rx_cnt = s.rx_cnt + 1;
    end

    if (acc && !apb_req_i.pwrite && apb_req_i.paddr[3:2] == 2'd1) n.rx_valid = 1'b0;
    if (wr && apb_req_i.paddr[3:2] == 2'd2 && apb_req_i.pwdata[2]) n.rx_ovr = 1'b0;
    if (wr && apb_req_i.paddr[3:2] == 2'd3) n.div = apb_req_i.pwdata[15:0];
  end

  assign tx_o  = s.tx_line;
  assign irq_o = s.rx_valid;
endmodule
