// tb_mspu: checks the Memory Scrubbing and Protection Unit on a 64-word memory.
//
// 1. OBI writes and reads (full words and single bytes) against a reference
//    model; every response must come exactly one cycle after the grant.
// 2. Single-bit upsets injected into the SRAM array are repaired in OBI read
//    data and counted in CORR_OBI.
// 3. The scrubber, enabled at full rate, repairs the stored words: the array
//    holds the clean codewords again and CORR_SCRUB counts the repaired bytes.
// 4. With no errors, one traversal takes exactly WORDS cycles at DIV=0 and
//    4*WORDS cycles at DIV=3 (one read per cycle at full rate); a correction
//    adds one cycle.
// 5. Two flips in one byte raise the OBI err bit, pulse de_o, count in DE_CNT
//    and are not written back by the scrubber.
// 6. OBI traffic runs while the scrubber is active and must stay correct.
module tb_mspu;
  import triglav_pkg::*;
  localparam int WORDS = 64;

  logic clk = 0, rst_n = 0;
  obi_req_t oreq;
  obi_rsp_t orsp;
  apb_req_t areq;
  apb_rsp_t arsp;
  logic de, corr, terr;
  int checks = 0, failures = 0;
  int de_pulses = 0;
  logic [31:0] refm [WORDS];

  mspu #(.WORDS(WORDS)) dut (
    .clk, .rst_n, .obi_req_i(oreq), .obi_rsp_o(orsp), .apb_req_i(areq), .apb_rsp_o(arsp),
    .de_o(de), .corr_o(corr), .tmr_err_o(terr)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (de) de_pulses++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic apb_wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    areq = '{psel: 1'b1, penable: 1'b0, pwrite: 1'b1, paddr: a, pwdata: d};
    @(negedge clk);
    areq.penable = 1'b1;
    @(negedge clk);
    areq = '0;
  endtask

  task automatic apb_rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    areq = '{psel: 1'b1, penable: 1'b0, pwrite: 1'b0, paddr: a, pwdata: '0};
    @(negedge clk);
    areq.penable = 1'b1;
    #1 d = arsp.prdata;
    @(negedge clk);
    areq = '0;
  endtask

  // one OBI transfer; checks grant and the one-cycle response latency
  task automatic obi(input logic we, input logic [3:0] be, input int w, input logic [31:0] wd,
                     output logic [31:0] rd, output logic err);
    @(negedge clk);
    oreq = '{req: 1'b1, we: we, be: be, addr: 32'(w) << 2, wdata: wd};
    #1 check(orsp.gnt, "gnt");
    @(negedge clk);
    oreq = '0;
    check(orsp.rvalid, "rvalid one cycle after gnt");
    rd = orsp.rdata;
    err = orsp.err;
  endtask

  function automatic logic [31:0] merge(logic [31:0] o, logic [31:0] n, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) o[8*b +: 8] = n[8*b +: 8];
    return o;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rd, v, p0, p1;
  logic err;
  logic [51:0] clean [WORDS];
  int t0, t1;

  initial begin
    oreq = '0; areq = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- 1. fill and read back
    for (int w = 0; w < WORDS; w++) begin
      refm[w] = $urandom;
      obi(1, 4'hF, w, refm[w], rd, err);
    end
    for (int k = 0; k < 200; k++) begin
      int w;
      logic [3:0] be;
      w = $urandom_range(0, WORDS - 1);
      be = 4'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        v = $urandom;
        obi(1, be, w, v, rd, err);
        refm[w] = merge(refm[w], v, be);
      end else begin
        obi(0, 4'hF, w, 0, rd, err);
        check(rd == refm[w] && !err, "read back");
      end
    end
    for (int w = 0; w < WORDS; w++) clean[w] = dut.u_sram.mem[w];
    // ---- 2. upsets seen through the OBI port
    for (int k = 0; k < 8; k++) dut.u_sram.mem[k * 5][13 * (k % 4) + k] ^= 1'b1;
    for (int k = 0; k < 8; k++) begin
      obi(0, 4'hF, k * 5, 0, rd, err);
      check(rd == refm[k * 5] && !err, "OBI read corrects");
    end
    apb_rd(12'h008, v);
    check(v == 8, "CORR_OBI counts 8");
    // ---- 3. scrubber repairs the array
    apb_wr(12'h004, 0);
    apb_wr(12'h000, 1);
    repeat (2 * WORDS + 10) @(posedge clk);
    for (int w = 0; w < WORDS; w++) check(dut.u_sram.mem[w] == clean[w], "scrubbed word clean");
    apb_rd(12'h00C, v);
    check(v == 8, "CORR_SCRUB counts 8");
    // ---- 4. traversal time
    apb_rd(12'h018, p0);
    @(posedge clk);
    while (dut.s.passes == p0) @(posedge clk);
    t0 = $time;
    @(posedge clk);
    while (dut.s.passes == p0 + 1) @(posedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == WORDS, "one word per cycle at full rate");
    $display("traversal at DIV=0: %0d cycles", (t1 - t0) / 10);
    dut.u_sram.mem[7][20] ^= 1'b1;
    @(posedge clk);
    p0 = dut.s.passes;
    while (dut.s.passes == p0) @(posedge clk);
    t0 = $time;
    check((t0 - t1) / 10 == 2 * WORDS + 1 || (t0 - t1) / 10 == WORDS + 1, "correction costs one extra cycle");
    apb_wr(12'h004, 3);
    @(posedge clk);
    p0 = dut.s.passes;
    while (dut.s.passes == p0) @(posedge clk);
    t0 = $time;
    @(posedge clk);
    while (dut.s.passes == p0 + 1) @(posedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == 4 * WORDS, "DIV=3 quarter rate");
    apb_wr(12'h004, 0);
    // ---- 5. double error
    apb_wr(12'h000, 0);
    dut.u_sram.mem[9][13 + 2] ^= 1'b1;
    dut.u_sram.mem[9][13 + 9] ^= 1'b1;
    de_pulses = 0;
    obi(0, 4'hF, 9, 0, rd, err);
    check(err, "double error gives OBI err");
    check(rd[7:0] == refm[9][7:0] && rd[31:16] == refm[9][31:16], "other bytes intact");
    @(posedge clk); #1;
    check(de_pulses == 1, "de_o pulse");
    apb_rd(12'h010, v);
    check(v == 1, "DE_CNT 1");
    p1 = dut.u_sram.mem[9][31:0];
    apb_wr(12'h000, 1);
    repeat (WORDS + 10) @(posedge clk);
    check(dut.u_sram.mem[9][31:0] == p1, "double error not written back");
    apb_rd(12'h010, v);
    check(v >= 2, "scrubber counts the double error too");
    apb_wr(12'h000, 0);
    obi(1, 4'hF, 9, refm[9], rd, err);
    // ---- 6. concurrent traffic while scrubbing with injected upsets
    apb_wr(12'h000, 1);
    for (int k = 0; k < 600; k++) begin
      int w;
      w = $urandom_range(0, WORDS - 1);
      if (k % 50 == 0) begin
        int uw, ub;
        uw = $urandom_range(0, WORDS - 1);
        ub = $urandom_range(0, 51);
        dut.u_sram.mem[uw][ub] ^= 1'b1;
      end
      if ($urandom_range(0, 1) == 1) begin
        v = $urandom;
        obi(1, 4'hF, w, v, rd, err);
        refm[w] = v;
      end else begin
        obi(0, 4'hF, w, 0, rd, err);
        check(rd == refm[w] && !err, "read during scrubbing");
      end
    end
    check(dut.s.passes > 3, "scrubber kept running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
