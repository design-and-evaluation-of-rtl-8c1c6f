// mspu: Memory Scrubbing and Protection Unit with its dual-port SRAM.
//
// Every OBI write is encoded byte by byte with Hamming(13,8) and stored as a
// 52-bit word; every OBI read is decoded, single errors per byte are repaired
// in the returned data and two errors in a byte raise the OBI err bit and the
// double-error output. The second SRAM port belongs to the scrubber, which
// walks the whole memory in the background so that single upsets are removed
// before a second one can hit the same byte. The scrubber reads one word per
// cycle; when a word holds correctable errors the following cycle writes the
// repaired bytes back, so a correction costs two cycles. At full rate the
// 8192 words of a 32 kB memory take 8192 cycles, 33 us at 250 MHz. OBI and
// scrubber accesses run at the same time on the two ports. All of this follows
// the document.
//
// This design's own choices: the OBI port grants every request at once and
// answers on the next cycle; an OBI read repairs only the returned data and
// leaves the write-back to the scrubber; the scrubber writes back only the
// bytes it corrected (never a byte with a double error), and drops a
// write-back if the OBI port wrote the same word in the read or write-back
// cycle. Scrubbing is off after reset (memory content is unknown at power-up)
// and is enabled, and its rate set, through registers on the APB side:
//   0x00 CTRL       bit0 scrub enable
//   0x04 DIV        one scrub read every DIV+1 cycles (0 = maximum rate)
//   0x08 CORR_OBI   bytes corrected on OBI reads       (write clears)
//   0x0C CORR_SCRUB bytes corrected by the scrubber    (write clears)
//   0x10 DE_CNT     double errors seen on either path  (write clears)
//   0x14 SCRUB_PTR  next word the scrubber reads       (read only)
//   0x18 PASSES     completed traversals of the memory (write clears)
// All control state sits in one tmr_reg, so it is triplicated and self-
// correcting; tmr_err_o feeds the module's TMR error counter. The next-state
// logic itself is written once here rather than triplicated.
module mspu
  import triglav_pkg::*;
#(
  parameter int unsigned WORDS = SRAM_WORDS,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  obi_req_t obi_req_i,
  output obi_rsp_t obi_rsp_o,
  input  apb_req_t apb_req_i,
  output apb_rsp_t apb_rsp_o,
  output logic     de_o,        // double error detected this cycle
  output logic     corr_o,      // a byte was corrected this cycle
  output logic     tmr_err_o
);
  typedef struct packed {
    logic          scrub_en;
    logic [15:0]   div;
    logic [15:0]   divcnt;
    logic [AW-1:0] ptr;
    logic          rd_pend;    // scrub read issued last cycle
    logic [AW-1:0] rd_addr;
    logic          stale;      // OBI wrote rd_addr in the scrub read cycle
    logic          obi_pend;   // OBI response due this cycle
    logic          obi_rd;     // ... and it is a read
    logic [31:0]   corr_obi;
    logic [31:0]   corr_scrub;
    logic [31:0]   de_cnt;
    logic [31:0]   passes;
  } st_t;

  st_t s, n;
  tmr_reg #(.W($bits(st_t))) u_state (
    .clk, .rst_n, .d_i(n), .q_o(s), .q3_o(), .err_o(tmr_err_o)
  );

  // ---------------------------------------------------------------- SRAM
  logic                 a_en, a_we, b_en, b_we;
  logic [3:0]           a_be, b_be;
  logic [AW-1:0]        a_addr, b_addr;
  logic [WORD_CW_W-1:0] a_wdata, a_rdata, b_wdata, b_rdata;

  sram_dp #(.DEPTH(WORDS), .LANE(CW_W), .NLANE(4)) u_sram (
    .clk,
    .a_en, .a_we, .a_be, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_be, .b_addr, .b_wdata, .b_rdata
  );

  // ---------------------------------------------------------------- ECC
  logic [31:0] a_data, b_data;
  logic [3:0]  a_corr, a_de, b_corr, b_de;

  ecc_enc32 u_enc_a (.data_i(obi_req_i.wdata), .cw_o(a_wdata));
  ecc_dec32 u_dec_a (.cw_i(a_rdata), .data_o(a_data), .corrected_o(a_corr), .double_err_o(a_de));
  ecc_dec32 u_dec_b (.cw_i(b_rdata), .data_o(b_data), .corrected_o(b_corr), .double_err_o(b_de));
  ecc_enc32 u_enc_b (.data_i(b_data), .cw_o(b_wdata));

  function automatic logic [31:0] popc4(logic [3:0] v);
    return 32'(v[0]) + 32'(v[1]) + 32'(v[2]) + 32'(v[3]);
  endfunction

  // ---------------------------------------------------------------- port A (OBI)
  always_comb begin
    a_en   = obi_req_i.req;
    a_we   = obi_req_i.we;
    a_be   = obi_req_i.be;
    a_addr = obi_req_i.addr[AW+1:2];
  end

  logic obi_rd_done;
  assign obi_rd_done = s.obi_pend && s.obi_rd;

  always_comb begin
    obi_rsp_o.gnt    = obi_req_i.req;
    obi_rsp_o.rvalid = s.obi_pend;
    obi_rsp_o.rdata  = obi_rd_done ? a_data : '0;
    obi_rsp_o.err    = obi_rd_done && (a_de != 0);
  end

  // ---------------------------------------------------------------- scrubber (port B)
  logic scrub_chk, fix, a_hits_rd, tick;
  logic [3:0] fix_lanes;

  always_comb begin
    scrub_chk = s.rd_pend;
    a_hits_rd = a_en && a_we && (a_addr == s.rd_addr);
    fix_lanes = b_corr & ~b_de;
    fix       = scrub_chk && (fix_lanes != 0) && !s.stale && !a_hits_rd;
    tick      = s.scrub_en && (s.divcnt == 0);

    b_en   = 1'b0;
    b_we   = 1'b0;
    b_be   = '0;
    b_addr = s.ptr;
    if (fix) begin
      b_en   = 1'b1;
      b_we   = 1'b1;
      b_be   = fix_lanes;
      b_addr = s.rd_addr;
    end else if (tick) begin
      b_en   = 1'b1;
    end
  end

  // ---------------------------------------------------------------- APB registers
  logic apb_wr;
  assign apb_wr = apb_req_i.psel && apb_req_i.penable && apb_req_i.pwrite;

  always_comb begin
    apb_rsp_o.pready  = 1'b1;
    apb_rsp_o.pslverr = 1'b0;
    case (apb_req_i.paddr[7:2])
      6'h0:    apb_rsp_o.prdata = 32'(s.scrub_en);
      6'h1:    apb_rsp_o.prdata = 32'(s.div);
      6'h2:    apb_rsp_o.prdata = s.corr_obi;
      6'h3:    apb_rsp_o.prdata = s.corr_scrub;
      6'h4:    apb_rsp_o.prdata = s.de_cnt;
      6'h5:    apb_rsp_o.prdata = 32'(s.ptr);
      6'h6:    apb_rsp_o.prdata = s.passes;
      default: apb_rsp_o.prdata = '0;
    endcase
  end

  // ---------------------------------------------------------------- next state
  logic [31:0] de_inc;
  always_comb begin
    de_inc = (obi_rd_done ? popc4(a_de) : 32'd0) + (scrub_chk ? popc4(b_de) : 32'd0);
    de_o   = de_inc != 0;
    corr_o = (obi_rd_done && a_corr != 0) || (scrub_chk && b_corr != 0);

    n          = s;
    n.obi_pend = obi_req_i.req;
    n.obi_rd   = obi_req_i.req && !obi_req_i.we;
    n.rd_pend  = 1'b0;
    n.stale    = 1'b0;

    if (s.scrub_en) n.divcnt = (s.divcnt == 0) ? s.div : s.divcnt - 16'd1;
    else            n.divcnt = '0;

    if (!fix && tick) begin
      n.rd_pend = 1'b1;
      n.rd_addr = s.ptr;
      n.stale   = a_hits_rd_now(s.ptr);
      if (32'(s.ptr) == WORDS - 1) begin
        n.ptr    = '0;
        n.passes = s.passes + 1;
      end else n.ptr = s.ptr + 1'b1;
    end else if (fix && s.scrub_en) begin
      // the read slot is taken by the write-back: hold the divider
      n.divcnt = s.divcnt;
    end

    if (obi_rd_done) n.corr_obi = s.corr_obi + popc4(a_corr);
    if (scrub_chk)   n.corr_scrub = s.corr_scrub + popc4(b_corr & ~b_de);
    n.de_cnt = s.de_cnt + de_inc;

    if (apb_wr) begin
      case (apb_req_i.paddr[7:2])
        6'h0: n.scrub_en   = apb_req_i.pwdata[0];
        6'h1: n.div        = apb_req_i.pwdata[15:0];
        6'h2: n.corr_obi   = '0;
        6'h3: n.corr_scrub = '0;
        6'h4: n.de_cnt     = '0;
        6'h6: n.passes     = '0;
        default: ;
      endcase
    end
  end

  function automatic logic a_hits_rd_now(logic [AW-1:0] addr);
    return a_en && a_we && (a_addr == addr);
  endfunction
endmodule
