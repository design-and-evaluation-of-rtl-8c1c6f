// i2c_obi: I2C target that gives an external I2C controller read and write
// access to the SoC through an OBI master port.
//
// The document makes I2C the SoC's main communication interface, used for
// programming and configuration; the transfer format below is this design's.
// SCL and SDA are sampled with two flops each; START, STOP and the SCL edges
// are found from the sampled values, so the system clock must be well above
// the I2C bit rate (at least 8 clocks per SCL half period). Outputs are open
// drain: *_oe_o = 1 pulls the line low.
//   write: S | DEV+W | A3 A2 A1 A0 | D3 D2 D1 D0 | D3 .. | P
//          the four bytes after the device address set the word address
//          (most significant first); every following group of four bytes is
//          one 32-bit word, most significant byte first, written by OBI to
//          the address, which then advances by 4.
//   read:  S | DEV+R | D3 D2 D1 D0 | D3 .. | P
//          the target reads the word at the address by OBI and sends it,
//          most significant byte first; when the controller acknowledges the
//          last byte of a word, the address advances by 4 and the next word
//          is fetched. A not-acknowledge ends the transfer.
// A device address other than DEV_ADDR is not acknowledged. While an OBI
// transfer is still running when the next byte is due, the target holds SCL
// low (clock stretching). The whole state sits in a tmr_reg.
module i2c_obi
  import triglav_pkg::*;
#(
  parameter logic [6:0] DEV_ADDR = 7'h50
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     scl_i,
  input  logic     sda_i,
  output logic     scl_oe_o,
  output logic     sda_oe_o,
  output obi_req_t obi_req_o,
  input  obi_rsp_t obi_rsp_i,
  output logic     tmr_err_o
);
  typedef enum logic [2:0] {IDLE, RX, RX_ACK, TX, TX_ACK, HOLD} state_e;

  typedef struct packed {
    state_e      st;
    logic [1:0]  scl_s;    // synchroniser; [1] is the settled value
    logic [1:0]  sda_s;
    logic        scl_q;    // settled value of the previous cycle
    logic        sda_q;
    logic [3:0]  bitcnt;
    logic [7:0]  sh;
    logic [15:0] nbyte;    // bytes since the device address
    logic        rw;       // 1: read transfer
    logic        sda_low;
    logic        ack_ok;
    logic [31:0] ptr;
    logic [31:0] wbuf;
    logic [31:0] rbuf;
    logic [1:0]  txb;      // byte of rbuf being sent
    logic        oreq;     // OBI request pending (before grant)
    logic        owait;    // OBI response pending
    logic        owe;
  } st_t;

  localparam st_t RST = '{st: IDLE, scl_s: 2'b11, sda_s: 2'b11, scl_q: 1'b1, sda_q: 1'b1, default: '0};

  st_t s, n;
  tmr_reg #(.W($bits(st_t)), .RST(RST)) u_state (
    .clk, .rst_n, .d_i(n), .q_o(s), .q3_o(), .err_o(tmr_err_o)
  );

  logic scl, sda, rise, fall, start, stop, busy;
  always_comb begin
    scl   = s.scl_s[1];
    sda   = s.sda_s[1];
    rise  = scl && !s.scl_q;
    fall  = !scl && s.scl_q;
    start = scl && s.scl_q && s.sda_q && !sda;
    stop  = scl && s.scl_q && !s.sda_q && sda;
    busy  = s.oreq || s.owait;
  end

  function automatic logic txbit(logic [31:0] w, logic [1:0] b, logic [3:0] i);
    return w[31 - 8 * int'(b) - int'(i)];
  endfunction

  always_comb begin
    obi_req_o.req   = s.oreq;
    obi_req_o.we    = s.owe;
    obi_req_o.be    = 4'hF;
    obi_req_o.addr  = s.ptr;
    obi_req_o.wdata = s.wbuf;
    scl_oe_o        = s.st == HOLD;
    sda_oe_o        = s.sda_low;

    n       = s;
    n.scl_s = {s.scl_s[0], scl_i};
    n.sda_s = {s.sda_s[0], sda_i};
    n.scl_q = scl;
    n.sda_q = sda;

    // OBI master: one transfer at a time
    if (s.oreq && obi_rsp_i.gnt) begin
      n.oreq  = 1'b0;
      n.owait = 1'b1;
    end
    if (s.owait && obi_rsp_i.rvalid) begin
      n.owait = 1'b0;
      if (!s.owe) n.rbuf = obi_rsp_i.rdata;
      else        n.ptr  = s.ptr + 32'd4;
    end

    unique case (s.st)
      IDLE: ;
      RX: begin
        if (rise) begin
          n.sh     = {s.sh[6:0], sda};
          n.bitcnt = s.bitcnt + 1;
        end
        if (fall && s.bitcnt == 8) begin
          n.nbyte   = s.nbyte + 1;
          n.sda_low = 1'b1;
          n.st      = RX_ACK;
          if (s.nbyte == 0) begin
            if (s.sh[7:1] != DEV_ADDR) begin
              n.sda_low = 1'b0;
              n.st      = IDLE;
            end else begin
              n.rw = s.sh[0];
              if (s.sh[0]) begin
                n.oreq = 1'b1;
                n.owe  = 1'b0;
                n.txb  = '0;
              end
            end
          end else if (s.nbyte <= 4) begin
            n.ptr = {s.ptr[23:0], s.sh};
          end else begin
            n.wbuf = {s.wbuf[23:0], s.sh};
            if (s.nbyte[1:0] == 2'd0) begin   // 4th byte of a word
              n.oreq = 1'b1;
              n.owe  = 1'b1;
            end
          end
        end
      end
      RX_ACK: if (fall) begin
        n.sda_low = 1'b0;
        n.bitcnt  = '0;
        n.st      = s.rw ? HOLD : RX;
        if (!s.rw && busy) n.st = HOLD;
      end
      HOLD: if (!busy && !n.owait && !n.oreq) begin
        // SCL is held low: present the first bit, then let SCL go
        n.bitcnt  = '0;
        if (s.rw) begin
          n.sda_low = !txbit(n.rbuf, s.txb, 4'd0);
          n.st      = TX;
        end else n.st = RX;
      end
      TX: begin
        if (rise) n.bitcnt = s.bitcnt + 1;
        if (fall) begin
          if (s.bitcnt == 8) begin
            n.sda_low = 1'b0;
            n.st      = TX_ACK;
          end else n.sda_low = !txbit(s.rbuf, s.txb, s.bitcnt);
        end
      end
      TX_ACK: begin
        if (rise) n.ack_ok = !sda;
        if (fall) begin
          if (!s.ack_ok) n.st = IDLE;
          else begin
            n.txb    = s.txb + 1;
            n.bitcnt = '0;
            if (s.txb == 2'd3) begin
              n.ptr  = s.ptr + 32'd4;
              n.oreq = 1'b1;
              n.owe  = 1'b0;
              n.st   = HOLD;
            end else begin
              n.sda_low = !txbit(s.rbuf, s.txb + 1, 4'd0);
              n.st      = TX;
            end
          end
        end
      end
      default: n.st = IDLE;
    endcase

    if (start) begin
      n.st      = RX;
      n.bitcnt  = '0;
      n.nbyte   = '0;
      n.sda_low = 1'b0;
    end
    if (stop) begin
      n.st      = IDLE;
      n.sda_low = 1'b0;
    end
  end
endmodule
