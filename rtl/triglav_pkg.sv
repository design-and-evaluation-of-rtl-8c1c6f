// triglav_pkg: types, constants and ECC functions shared by the TriglaV SoC RTL.
//
// Hamming(13,8) SEC-DED code (byte-level ECC). The document specifies a 13-bit
// code carrying 8 data bits and 5 parity bits, able to correct one error and to
// detect two errors within a byte. The bit arrangement below is this design's
// own: a Hamming(12,8) code with parity bits at positions 1, 2, 4 and 8 and data
// bits at positions 3, 5, 6, 7, 9, 10, 11, 12, plus an overall parity bit.
// Codeword bit cw[p-1] holds position p (p = 1..12); cw[12] is the overall
// parity over cw[11:0]. A 32-bit word is four independent codewords, byte b in
// cw52[13*b +: 13].
//
// OBI request/response structs follow the OBI A and R channels (req/gnt,
// rvalid/rdata/err) reduced to the signals used here. The APB-RT structs carry
// ECC-encoded address and data and triplicated control signals, as the
// document describes for the radiation-tolerant peripheral bus.
// The address map is this design's choice; the document does not give one.
package triglav_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned SRAM_BYTES   = 32768;          // per MSPU (Fig. 1: 32kB)
  localparam int unsigned SRAM_WORDS   = SRAM_BYTES / 4; // 8192 32-bit words
  localparam int unsigned CW_W         = 13;             // Hamming(13,8)
  localparam int unsigned WORD_CW_W    = 4 * CW_W;       // 52 bits per word

  // ---------------------------------------------------------------- address map
  localparam logic [31:0] BOOT_BASE  = 32'h0000_0000;
  localparam logic [31:0] IMEM_BASE  = 32'h0001_0000;
  localparam logic [31:0] DMEM_BASE  = 32'h0002_0000;
  localparam logic [31:0] APB_BASE   = 32'h1000_0000;
  // APB-RT peripheral slots, 4 KiB each
  localparam int unsigned APB_SOCCTRL = 0;
  localparam int unsigned APB_TIMER0  = 1;
  localparam int unsigned APB_TIMER1  = 2;
  localparam int unsigned APB_UART    = 3;
  localparam int unsigned APB_GPIO    = 4;
  localparam int unsigned APB_PLIC    = 5;
  localparam int unsigned APB_IMSPU   = 6;
  localparam int unsigned APB_DMSPU   = 7;
  localparam int unsigned APB_NSLV    = 8;

  // ---------------------------------------------------------------- OBI
  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } obi_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
    logic        err;
  } obi_rsp_t;

  // ---------------------------------------------------------------- plain APB
  typedef struct packed {
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [11:0] paddr;
    logic [31:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic        pready;
    logic        pslverr;
    logic [31:0] prdata;
  } apb_rsp_t;

  // ---------------------------------------------------------------- APB-RT
  // Control triplicated, address and data Hamming(13,8) protected.
  typedef struct packed {
    logic [2:0]           psel;
    logic [2:0]           penable;
    logic [2:0]           pwrite;
    logic [WORD_CW_W-1:0] paddr;
    logic [WORD_CW_W-1:0] pwdata;
  } apbrt_req_t;

  typedef struct packed {
    logic [2:0]           pready;
    logic [2:0]           pslverr;
    logic [WORD_CW_W-1:0] prdata;
  } apbrt_rsp_t;

  // ---------------------------------------------------------------- ECC
  typedef struct packed {
    logic [7:0] data;
    logic       corrected;  // one bit was flipped and has been repaired
    logic       double_err; // two bits flipped: data is not trustworthy
  } dec8_t;

  // data bit i sits at Hamming position DPOS[i]
  function automatic int unsigned dpos(int unsigned i);
    case (i)
      0: return 3;  1: return 5;  2: return 6;  3: return 7;
      4: return 9;  5: return 10; 6: return 11; default: return 12;
    endcase
  endfunction

  function automatic logic [CW_W-1:0] ham13_enc(logic [7:0] d);
    logic [CW_W-1:0] cw;
    cw = '0;
    for (int unsigned i = 0; i < 8; i++) cw[dpos(i)-1] = d[i];
    for (int unsigned k = 0; k < 4; k++) begin
      logic p;
      p = 1'b0;
      for (int unsigned pos = 1; pos <= 12; pos++)
        if (((pos >> k) & 1) == 1 && pos != (1 << k)) p ^= cw[pos-1];
      cw[(1 << k) - 1] = p;
    end
    cw[12] = ^cw[11:0];
    return cw;
  endfunction

  function automatic dec8_t ham13_dec(logic [CW_W-1:0] cw_in);
    logic [CW_W-1:0] cw;
    logic [3:0]      syn;
    logic            par;
    dec8_t           r;
    cw  = cw_in;
    syn = '0;
    for (int unsigned pos = 1; pos <= 12; pos++)
      if (cw[pos-1]) syn ^= 4'(pos);
    par = ^cw;
    r.corrected  = 1'b0;
    r.double_err = 1'b0;
    if (par) begin
      // odd number of flips: treat as a single error at position syn
      if (syn == 0) r.corrected = 1'b1;            // the overall parity bit itself
      else if (syn <= 12) begin
        cw[syn-1]   = ~cw[syn-1];
        r.corrected = 1'b1;
      end else r.double_err = 1'b1;               // syndrome points outside the word
    end else if (syn != 0) r.double_err = 1'b1;   // even flips, nonzero syndrome
    for (int unsigned i = 0; i < 8; i++) r.data[i] = cw[dpos(i)-1];
    return r;
  endfunction

  function automatic logic [WORD_CW_W-1:0] ecc_enc_word(logic [31:0] d);
    logic [WORD_CW_W-1:0] cw;
    for (int unsigned b = 0; b < 4; b++) cw[CW_W*b +: CW_W] = ham13_enc(d[8*b +: 8]);
    return cw;
  endfunction

  // majority of three
  function automatic logic maj3(logic a, logic b, logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
