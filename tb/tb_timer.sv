// tb_timer: prescaler, compare match, auto-reload and interrupt of the timer.
//
// With PRESC = p the counter must advance once every p+1 cycles; with CMP = c
// and auto-reload the match flag must rise every c*(p+1) cycles. The
// interrupt must follow the flag only when enabled, and clear on write-1.
// Eight random (PRESC, CMP) pairs are timed the same way. The registers must
// read back, a stopped timer must hold its count, a timer without auto-reload
// must count past CMP, and an upset in one state copy must be out-voted
// without disturbing the count.
module tb_timer;
  import triglav_pkg::*;
  logic clk = 0, rst_n = 0;
  apb_req_t areq;
  apb_rsp_t arsp;
  logic irq, terr;
  int checks = 0, failures = 0;

  timer dut (.clk, .rst_n, .apb_req_i(areq), .apb_rsp_o(arsp), .irq_o(irq), .tmr_err_o(terr));
  always #5 clk = ~clk;

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

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    // register read-back
    apb_rd(12'h000, v); check(v == 3'b011, "CTRL reads back");
    apb_rd(12'h004, v); check(v == 3, "PRESC reads back");
    apb_rd(12'h00C, v); check(v == 5, "CMP reads back");
    apb_rd(12'h014, v); check(v == 0, "unmapped offset reads 0");
    // random prescaler/compare pairs: period must be c*(p+1) cycles
    for (int k = 0; k < 8; k++) begin
      int p, c;
      p = $urandom_range(0, 6);
      c = $urandom_range(2, 12);
      apb_wr(12'h000, 0);
      apb_wr(12'h010, 1);
      apb_wr(12'h004, p);
      apb_wr(12'h00C, c);
      apb_wr(12'h008, 0);
      apb_wr(12'h000, 3'b111);
      while (!irq) @(posedge clk);
      t0 = $time;
      apb_wr(12'h010, 1);
      while (!irq) @(posedge clk);
      t1 = $time;
      check((t1 - t0) / 10 == c * (p + 1), $sformatf("period for PRESC=%0d CMP=%0d", p, c));
    end
    // stopped timer holds its count
    apb_wr(12'h000, 0);
    apb_rd(12'h008, c0);
    repeat (30) @(negedge clk);
    apb_rd(12'h008, c1);
    check(c0 == c1, "disabled timer holds its count");
    // no auto-reload: counts past CMP, flag set once
    apb_wr(12'h004, 0);
    apb_wr(12'h00C, 4);
    apb_wr(12'h008, 0);
    apb_wr(12'h010, 1);
    apb_wr(12'h000, 3'b001);
    repeat (20) @(negedge clk);
    apb_rd(12'h008, v);
    check(v > 15, "no auto-reload: count passes CMP");
    apb_rd(12'h010, v);
    check(v == 1, "flag set at CMP without reload");
    // upset in one copy of the state
    apb_wr(12'h000, 0);
    apb_wr(12'h008, 32'h0000_1234);
    @(negedge clk);
    begin
      int cp, b;
      logic seen;
      cp = $urandom_range(0, 2);
      b = $urandom_range(0, $bits(dut.s) - 1);
      dut.u_state.r[cp][b] ^= 1'b1;
      #1 seen = terr;
      check(seen, "upset shows on tmr_err_o");
      @(posedge clk);
      #1 check(!terr, "copies agree again one edge later");
    end
    apb_rd(12'h008, v);
    check(v == 32'h0000_1234, "count survives an upset");
    apb_rd(12'h000, v);
    check(v == 0, "CTRL survives an upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  logic [31:0] v, c0, c1;
  int t0, t1;
  initial begin
    areq = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    apb_wr(12'h004, 3);           // PRESC = 3: one tick every 4 cycles
    apb_wr(12'h000, 1);           // enable, no reload
    apb_rd(12'h008, c0);
    repeat (40) @(negedge clk);
    apb_rd(12'h008, c1);
    check(c1 - c0 == 11 || c1 - c0 == 10, "count rate 1 per 4 cycles");
    $display("count advanced %0d in 43 cycles", c1 - c0);
    apb_wr(12'h000, 0);
    apb_wr(12'h008, 0);
    apb_wr(12'h00C, 5);           // CMP = 5
    apb_wr(12'h000, 3'b111);      // enable, reload, irq
    while (!irq) @(posedge clk);
    t0 = $time;
    apb_wr(12'h010, 1);
    check(!irq, "irq cleared");
    while (!irq) @(posedge clk);
    t1 = $time;
    $display("match period %0d cycles", (t1 - t0) / 10);
    check((t1 - t0) / 10 == 20, "match every CMP*(PRESC+1) cycles");
    apb_wr(12'h000, 3'b011);      // interrupt disabled
    check(!irq, "irq masked");
    apb_rd(12'h010, v);
    check(v == 1, "flag still set");
    apb_rd(12'h008, v);
    check(v < 5, "auto-reload keeps count below CMP");
    // register read-back
    apb_rd(12'h000, v); check(v == 3'b011, "CTRL reads back");
    apb_rd(12'h004, v); check(v == 3, "PRESC reads back");
    apb_rd(12'h00C, v); check(v == 5, "CMP reads back");
    apb_rd(12'h014, v); check(v == 0, "unmapped offset reads 0");
    // random prescaler/compare pairs: period must be c*(p+1) cycles
    for (int k = 0; k < 8; k++) begin
      int p, c;
      p = $urandom_range(0, 6);
      c = $urandom_range(2, 12);
      apb_wr(12'h000, 0);
      apb_wr(12'h010, 1);
      apb_wr(12'h004, p);
      apb_wr(12'h00C, c);
      apb_wr(12'h008, 0);
      apb_wr(12'h000, 3'b111);
      while (!irq) @(posedge clk);
      t0 = $time;
      apb_wr(12'h010, 1);
      while (!irq) @(posedge clk);
      t1 = $time;
      check((t1 - t0) / 10 == c * (p + 1), $sformatf("period for PRESC=%0d CMP=%0d", p, c));
    end
    // stopped timer holds its count
    apb_wr(12'h000, 0);
    apb_rd(12'h008, c0);
    repeat (30) @(negedge clk);
    apb_rd(12'h008, c1);
    check(c0 == c1, "disabled timer holds its count");
    // no auto-reload: counts past CMP, flag set once
    apb_wr(12'h004, 0);
    apb_wr(12'h00C, 4);
    apb_wr(12'h008, 0);
    apb_wr(12'h010, 1);
    apb_wr(12'h000, 3'b001);
    repeat (20) @(negedge clk);
    apb_rd(12'h008, v);
    check(v > 15, "no auto-reload: count passes CMP");
    apb_rd(12'h010, v);
    check(v == 1, "flag set at CMP without reload");
    // upset in one copy of the state
    apb_wr(12'h000, 0);
    apb_wr(12'h008, 32'h0000_1234);
    @(negedge clk);
    begin
      int cp, b;
      logic seen;
      cp = $urandom_range(0, 2);
      b = $urandom_range(0, $bits(dut.s) - 1);
      dut.u_state.r[cp][b] ^= 1'b1;
      #1 seen = terr;
      check(seen, "upset shows on tmr_err_o");
      @(posedge clk);
      #1 check(!terr, "copies agree again one edge later");
    end
    apb_rd(12'h008, v);
    check(v == 32'h0000_1234, "count survives an upset");
    apb_rd(12'h000, v);
    check(v == 0, "CTRL survives an upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
