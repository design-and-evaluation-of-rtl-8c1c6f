// obi_xbar: N x M OBI crossbar with triplicated state.
//
// Connects NM OBI masters to NS OBI slaves, the multi-master-and-slave
// crossbar of the document. Each slave has its own round-robin arbiter, so
// masters that target different slaves are served in the same cycle. A
// request is routed by address: slave s owns the addresses with
// (addr & S_MASK[s]) == S_BASE[s]; an address that no slave owns is granted
// at once and answered on the next cycle with err set.
//
// Timing: the grant is combinational from the request (as in OBI). Each master
// may have one transaction outstanding; it may issue the next one in the cycle
// its response arrives, so a master talking to a one-cycle slave keeps one
// transfer per cycle. Each slave keeps a small queue (depth 2) of the masters
// it has granted, and returns responses in order, so a slave may have two
// outstanding transactions from different masters. The one-outstanding rule,
// the queue depth and the round-robin policy are this design's choices; the
// document only says the crossbar is N x M and fully triplicated. All arbiter
// and routing state sits in a tmr_reg (triplicated, voted, self-correcting);
// the combinational routing is written once.
module obi_xbar
  import triglav_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned NS = 4,
  parameter logic [NS-1:0][31:0] S_BASE = {APB_BASE, DMEM_BASE, IMEM_BASE, BOOT_BASE},
  parameter logic [NS-1:0][31:0] S_MASK = {32'hF000_0000, 32'hFFFF_8000, 32'hFFFF_8000, 32'hFFFF_8000}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  obi_req_t [NM-1:0]   m_req_i,
  output obi_rsp_t [NM-1:0]   m_rsp_o,
  output obi_req_t [NS-1:0]   s_req_o,
  input  obi_rsp_t [NS-1:0]   s_rsp_i,
  output logic                tmr_err_o
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned SW = $clog2(NS + 1);

  typedef struct packed {
    logic [NS-1:0][MW-1:0]      rr;     // last master granted per slave
    logic [NS-1:0][1:0][MW-1:0] q;      // per-slave queue of granted masters
    logic [NS-1:0][1:0]         qcnt;
    logic [NM-1:0]              busy;   // master has a transaction outstanding
    logic [NM-1:0]              errp;   // decode-error response due
  } st_t;

  st_t s, n;
  tmr_reg #(.W($bits(st_t))) u_state (
    .clk, .rst_n, .d_i(n), .q_o(s), .q3_o(), .err_o(tmr_err_o)
  );

  logic [NM-1:0][SW-1:0] dest;     // NS means "no slave"
  logic [NM-1:0]         rsp_now;  // master receives its response this cycle
  logic [NM-1:0]         can_issue;
  logic [NS-1:0]         sel_v;
  logic [NS-1:0][MW-1:0] sel_m;

  // k-th master after the last one granted
  function automatic int rr_idx(logic [MW-1:0] last, int k);
    return (int'(last) + k) % int'(NM);
  endfunction

  always_comb begin
    // address decode
    for (int m = 0; m < int'(NM); m++) begin
      dest[m] = SW'(NS);
      for (int sl = int'(NS) - 1; sl >= 0; sl--)
        if ((m_req_i[m].addr & S_MASK[sl]) == S_BASE[sl]) dest[m] = SW'(sl);
    end

    // responses
    rsp_now = s.errp;
    for (int m = 0; m < int'(NM); m++) m_rsp_o[m] = '0;
    for (int m = 0; m < int'(NM); m++)
      if (s.errp[m]) begin
        m_rsp_o[m].rvalid = 1'b1;
        m_rsp_o[m].err    = 1'b1;
      end
    for (int sl = 0; sl < int'(NS); sl++)
      if (s_rsp_i[sl].rvalid && s.qcnt[sl] != 0) begin
        m_rsp_o[s.q[sl][0]].rvalid = 1'b1;
        m_rsp_o[s.q[sl][0]].rdata  = s_rsp_i[sl].rdata;
        m_rsp_o[s.q[sl][0]].err    = s_rsp_i[sl].err;
        rsp_now[s.q[sl][0]]        = 1'b1;
      end

    for (int m = 0; m < int'(NM); m++)
      can_issue[m] = m_req_i[m].req && (!s.busy[m] || rsp_now[m]);

    // per-slave round-robin arbitration
    for (int sl = 0; sl < int'(NS); sl++) begin
      sel_v[sl] = 1'b0;
      sel_m[sl] = '0;
      for (int k = 1; k <= int'(NM); k++) begin
        if (!sel_v[sl] && can_issue[rr_idx(s.rr[sl], k)] && dest[rr_idx(s.rr[sl], k)] == SW'(sl) &&
            (s.qcnt[sl] != 2 || s_rsp_i[sl].rvalid)) begin
          sel_v[sl] = 1'b1;
          sel_m[sl] = MW'(rr_idx(s.rr[sl], k));
        end
      end
      s_req_o[sl]     = m_req_i[sel_m[sl]];
      s_req_o[sl].req = sel_v[sl];
      if (sel_v[sl]) m_rsp_o[sel_m[sl]].gnt = s_rsp_i[sl].gnt;
    end
    for (int m = 0; m < int'(NM); m++)
      if (can_issue[m] && dest[m] == SW'(NS)) m_rsp_o[m].gnt = 1'b1;

    // next state
    n = s;
    n.errp = '0;
    for (int m = 0; m < int'(NM); m++) begin
      if (rsp_now[m]) n.busy[m] = 1'b0;
      if (can_issue[m] && dest[m] == SW'(NS)) begin
        n.busy[m] = 1'b1;
        n.errp[m] = 1'b1;
      end
    end
    for (int sl = 0; sl < int'(NS); sl++) begin
      logic pop, push;
      pop  = s_rsp_i[sl].rvalid && s.qcnt[sl] != 0;
      push = sel_v[sl] && s_rsp_i[sl].gnt;
      if (pop) begin
        n.q[sl][0]  = s.q[sl][1];
        n.qcnt[sl]  = s.qcnt[sl] - 2'd1;
      end
      if (push) begin
        n.q[sl][n.qcnt[sl][0]] = sel_m[sl];
        n.qcnt[sl]             = n.qcnt[sl] + 2'd1;
        n.rr[sl]               = sel_m[sl];
        n.busy[sel_m[sl]]      = 1'b1;
      end
    end
  end
endmodule
