// tb_obi_xbar: four masters against four slaves through the OBI crossbar.
//
// Slaves 0-2 are one-cycle memories, slave 3 a slow slave with random grant
// and one to three cycles of response latency. Each master issues random
// reads and writes to its own region of every slave (so the expected data of
// each master is known), plus some unmapped addresses that must come back
// with err. Masters hold a request until it is granted and issue the next one
// right after a grant. Every response is compared with a per-master queue of
// expected results. Counted mechanisms: two masters asking for the same slave
// in one cycle (arbitration), grants to two masters in one cycle (parallel
// paths), a master granted in consecutive cycles (one transfer per cycle),
// decode errors, stalls (request not granted). Upsets are injected into the
// triplicated state; traffic must stay correct and tmr_err_o must show them.
module tb_obi_xbar;
  import triglav_pkg::*;
  localparam int NM = 4, NS = 4, NOPS = 600;

  logic clk = 0, rst_n = 0;
  obi_req_t [NM-1:0] m_req;
  obi_rsp_t [NM-1:0] m_rsp;
  obi_req_t [NS-1:0] s_req;
  obi_rsp_t [NS-1:0] s_rsp;
  logic terr;
  int checks = 0, failures = 0;
  int n_contend = 0, n_parallel = 0, n_b2b = 0, n_decerr = 0, n_stall = 0, n_terr = 0;
  logic [31:0] bases [4] = '{32'h0000_0000, 32'h0001_0000, 32'h0002_0000, 32'h1000_0000};

  obi_xbar #(.NM(NM), .NS(NS)) dut (
    .clk, .rst_n, .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(s_req), .s_rsp_i(s_rsp), .tmr_err_o(terr)
  );

  tb_obi_mem #(.SLOW(0)) u_s0 (.clk, .req_i(s_req[0]), .rsp_o(s_rsp[0]));
  tb_obi_mem #(.SLOW(0)) u_s1 (.clk, .req_i(s_req[1]), .rsp_o(s_rsp[1]));
  tb_obi_mem #(.SLOW(0)) u_s2 (.clk, .req_i(s_req[2]), .rsp_o(s_rsp[2]));
  tb_obi_mem #(.SLOW(1)) u_s3 (.clk, .req_i(s_req[3]), .rsp_o(s_rsp[3]));

  always #5 clk = ~clk;

  typedef struct {
    logic        is_read;
    logic        err;
    logic [31:0] data;
  } exp_t;
  exp_t expq [NM][$];
  logic [31:0] refm [NM][4][16];
  int done_m [NM];
  logic [NM-1:0] gnt_prev = '0;
  int cu, bu;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // OBI rule: a request stays up, unchanged, until it is granted
  for (genvar m = 0; m < NM; m++) begin : g_prop
    assert property (@(posedge clk) disable iff (!rst_n)
      m_req[m].req && !m_rsp[m].gnt |=> m_req[m].req && $stable(m_req[m].addr));
  end

  // response monitor and mechanism counters
  always @(posedge clk) if (rst_n) begin
    int ng, dst [NM];
    ng = 0;
    for (int m = 0; m < NM; m++) begin
      if (m_rsp[m].rvalid) begin
        exp_t e;
        checks++;
        if (expq[m].size() == 0) begin
          failures++;
          $display("FAIL unexpected response m%0d", m);
        end else begin
          e = expq[m].pop_front();
          if (m_rsp[m].err != e.err || (e.is_read && !e.err && m_rsp[m].rdata != e.data)) begin
            failures++;
            if (failures < 20) $display("FAIL m%0d rdata=%h exp=%h err=%b", m, m_rsp[m].rdata, e.data, m_rsp[m].err);
          end
          if (e.err) n_decerr++;
        end
      end
      if (m_req[m].req && m_rsp[m].gnt) ng++;
      if (m_req[m].req && !m_rsp[m].gnt) n_stall++;
      if (gnt_prev[m] && m_req[m].req && m_rsp[m].gnt) n_b2b++;
      gnt_prev[m] <= m_req[m].req && m_rsp[m].gnt;
    end
    if (ng >= 2) n_parallel++;
    for (int a = 0; a < NM; a++)
      for (int b = a + 1; b < NM; b++)
        if (m_req[a].req && m_req[b].req && m_req[a].addr[31:15] == m_req[b].addr[31:15]) n_contend++;
  end

  task automatic master(input int m);
    for (int k = 0; k < NOPS; k++) begin
      int sl, w;
      logic we;
      logic [31:0] wd, a;
      exp_t e;
      sl = $urandom_range(0, 3);
      w  = $urandom_range(0, 15);
      we = $urandom_range(0, 1) == 1;
      wd = $urandom;
      a  = bases[sl] + 32'((m * 16 + w) * 4);
      e.err = 1'b0;
      if ($urandom_range(0, 19) == 0) begin
        a = 32'h4000_0000 + 32'(w * 4);   // owned by no slave
        e.err = 1'b1;
      end
      e.is_read = !we;
      e.data    = e.err ? 32'd0 : refm[m][sl][w];
      if (we && !e.err) refm[m][sl][w] = wd;
      @(negedge clk);
      m_req[m] = '{req: 1'b1, we: we, be: 4'hF, addr: a, wdata: wd};
      @(posedge clk);
      while (!m_rsp[m].gnt) @(posedge clk);
      expq[m].push_back(e);
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        m_req[m] = '0;
      end
    end
    @(negedge clk);
    m_req[m] = '0;
    done_m[m] = 1;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_req = '0;
    for (int m = 0; m < NM; m++) begin
      done_m[m] = 0;
      for (int s = 0; s < 4; s++) for (int w = 0; w < 16; w++) refm[m][s][w] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      master(0);
      master(1);
      master(2);
      master(3);
      begin
        // upsets in one copy of the triplicated state
        for (int k = 0; k < 40; k++) begin
          repeat (37) @(negedge clk);
          cu = $urandom_range(0, 2);
          bu = $urandom_range(0, $bits(dut.s) - 1);
          dut.u_state.r[cu][bu] ^= 1'b1;
          #1 if (terr) n_terr++;
        end
      end
    join
    repeat (10) @(posedge clk);
    for (int m = 0; m < NM; m++) check(expq[m].size() == 0, "all responses arrived");
    $display("contend=%0d parallel=%0d b2b=%0d decerr=%0d stall=%0d tmr_err=%0d",
             n_contend, n_parallel, n_b2b, n_decerr, n_stall, n_terr);
    check(n_contend > 0, "arbitration happened");
    check(n_parallel > 0, "parallel grants happened");
    check(n_b2b > 0, "back-to-back grants happened");
    check(n_decerr > 0, "decode errors happened");
    check(n_stall > 0, "stalls happened");
    check(n_terr >= 40, "every upset seen by tmr_err_o");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
