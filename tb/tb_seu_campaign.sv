// tb_seu_campaign: an irradiation run in simulation, at full size.
//
// The chip's upset counters are what a heavy-ion test reads out, so this test
// does what a beam does and checks that the counters tell the truth. While
// the bus masters keep reading both memories and a timer keeps running, and
// both scrubbers sweep at full rate:
//  * NTMR_HITS single-bit upsets hit random bits of one copy of the
//    triplicated state of random modules (all eleven triplicated modules), one
//    at a time;
//  * NSRAM_HITS single-bit upsets hit random bytes of both 32 kB SRAMs (at
//    most one per byte, so none becomes a double error);
//  * a few double upsets (two bits in one byte) hit the data memory.
// Afterwards the testbench reads every counter over the bus. Each module's TMR
// counter must equal the number of upsets injected into it. Each MSPU's
// scrubber count must equal the SRAM upsets injected into its memory. All
// data read during the run must be correct except the words holding a double
// error, which must come back with a bus error. The double-error pin must be
// up. After software rewrites those words, a clean sweep must follow.
module tb_seu_campaign;
  import triglav_pkg::*;
  localparam int NTMR_HITS = 300, NSRAM_HITS = 400, NDOUBLE = 4, NMOD = 11;

  logic clk = 0, rst_n = 0;
  obi_req_t ci_req, cd_req, dbg_req, boot_req;
  obi_rsp_t ci_rsp, cd_rsp, dbg_rsp, boot_rsp;
  logic irq, tx, de, ret;
  logic [31:0] retval;
  logic [7:0] go, goe;
  logic scl_oe, sda_oe;
  int checks = 0, failures = 0;
  int tmr_hits [NMOD];
  int sram_hits [2];
  bit hit_byte [2][int];
  int dbl_word [NDOUBLE];
  logic running = 1'b0;

  triglav_top dut (
    .clk, .rst_n,
    .cpu_instr_req_i(ci_req), .cpu_instr_rsp_o(ci_rsp),
    .cpu_data_req_i(cd_req), .cpu_data_rsp_o(cd_rsp),
    .dbg_req_i(dbg_req), .dbg_rsp_o(dbg_rsp),
    .i2c_scl_i(1'b1), .i2c_sda_i(1'b1), .i2c_scl_oe_o(scl_oe), .i2c_sda_oe_o(sda_oe),
    .boot_req_o(boot_req), .boot_rsp_i(boot_rsp),
    .irq_o(irq), .uart_tx_o(tx), .uart_rx_i(tx),
    .gpio_i(8'h0F), .gpio_o(go), .gpio_oe_o(goe),
    .de_o(de), .ret_o(ret), .retval_o(retval)
  );

  tb_obi_master u_ci  (.clk, .req_o(ci_req),  .rsp_i(ci_rsp));
  tb_obi_master u_cd  (.clk, .req_o(cd_req),  .rsp_i(cd_rsp));
  tb_obi_master u_dbg (.clk, .req_o(dbg_req), .rsp_i(dbg_rsp));
  tb_obi_mem #(.SLOW(0)) u_boot (.clk, .req_i(boot_req), .rsp_o(boot_rsp));

  always #2 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one flip in copy c of module m's triplicated state
  task automatic tmr_hit(input int m);
    int c;
    c = $urandom_range(0, 2);
    case (m)
      0:  begin int b; b = $urandom_range(0, $bits(dut.u_xbar.s) - 1);   dut.u_xbar.u_state.r[c][b]   ^= 1'b1; end
      1:  begin int b; b = $urandom_range(0, $bits(dut.u_imspu.s) - 1);  dut.u_imspu.u_state.r[c][b]  ^= 1'b1; end
      2:  begin int b; b = $urandom_range(0, $bits(dut.u_dmspu.s) - 1);  dut.u_dmspu.u_state.r[c][b]  ^= 1'b1; end
      3:  begin int b; b = $urandom_range(0, $bits(dut.u_apb.s) - 1);    dut.u_apb.u_state.r[c][b]    ^= 1'b1; end
      4:  begin int b; b = $urandom_range(0, $bits(dut.u_ctrl.s) - 1);   dut.u_ctrl.u_state.r[c][b]   ^= 1'b1; end
      5:  begin int b; b = $urandom_range(0, $bits(dut.u_timer0.s) - 1); dut.u_timer0.u_state.r[c][b] ^= 1'b1; end
      6:  begin int b; b = $urandom_range(0, $bits(dut.u_timer1.s) - 1); dut.u_timer1.u_state.r[c][b] ^= 1'b1; end
      7:  begin int b; b = $urandom_range(0, $bits(dut.u_uart.s) - 1);   dut.u_uart.u_state.r[c][b]   ^= 1'b1; end
      8:  begin int b; b = $urandom_range(0, $bits(dut.u_gpio.s) - 1);   dut.u_gpio.u_state.r[c][b]   ^= 1'b1; end
      9:  begin int b; b = $urandom_range(0, $bits(dut.u_plic.s) - 1);   dut.u_plic.u_state.r[c][b]   ^= 1'b1; end
      default: begin int b; b = $urandom_range(0, $bits(dut.u_i2c.s) - 1); dut.u_i2c.u_state.r[c][b] ^= 1'b1; end
    endcase
  endtask

  // one flip in a byte of memory k that has not been hit before
  task automatic sram_hit(input int k);
    int w, by, bit_i, key;
    do begin
      w  = $urandom_range(0, int'(SRAM_WORDS) - 1);
      by = $urandom_range(0, 3);
      key = w * 4 + by;
    end while (hit_byte[k].exists(key) || (k == 1 && w < 16));
    hit_byte[k][key] = 1'b1;
    bit_i = 13 * by + $urandom_range(0, 12);
    if (k == 0) dut.u_imspu.u_sram.mem[w][bit_i] ^= 1'b1;
    else        dut.u_dmspu.u_sram.mem[w][bit_i] ^= 1'b1;
    sram_hits[k]++;
  endtask

  function automatic logic [31:0] pattern(int w);
    return 32'(w) * 32'h9E37_79B9 ^ 32'h5555_AAAA;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] CTRL  = APB_BASE + 32'(APB_SOCCTRL << 12);
  localparam logic [31:0] T0    = APB_BASE + 32'(APB_TIMER0 << 12);
  localparam logic [31:0] IREGS = APB_BASE + 32'(APB_IMSPU << 12);
  localparam logic [31:0] DREGS = APB_BASE + 32'(APB_DMSPU << 12);

  logic [31:0] rd;
  logic err;
  int bad_reads = 0, err_reads = 0;

  initial begin
    for (int m = 0; m < NMOD; m++) tmr_hits[m] = 0;
    sram_hits = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // software: fill both memories, start timer and scrubbers, clear counters
    for (int w = 0; w < int'(SRAM_WORDS); w++) begin
      u_cd.wr(IMEM_BASE + 32'(w * 4), pattern(w));
      u_cd.wr(DMEM_BASE + 32'(w * 4), ~pattern(w));
    end
    u_cd.wr(T0 + 32'hC, 40);
    u_cd.wr(T0 + 32'h0, 3'b011);
    u_cd.wr(IREGS + 32'h0, 1);
    u_cd.wr(DREGS + 32'h0, 1);
    for (int i = 0; i < NMOD; i++) u_cd.wr(CTRL + 32'h100 + 32'(4 * i), 0);
    running = 1'b1;
    fork
      begin : beam
        for (int n = 0; n < NTMR_HITS + NSRAM_HITS; n++) begin
          repeat ($urandom_range(20, 60)) @(negedge clk);
          if (n % 7 < 3 && n / 7 * 3 + n % 7 < NTMR_HITS) begin
            int m;
            m = $urandom_range(0, NMOD - 1);
            tmr_hit(m);
            tmr_hits[m]++;
          end else sram_hit($urandom_range(0, 1));
        end
        // double upsets in words 0..15 of the data memory, which stay unhit otherwise
        for (int d = 0; d < NDOUBLE; d++) begin
          dbl_word[d] = 4 * d + 1;
          dut.u_dmspu.u_sram.mem[dbl_word[d]][13 + 2] ^= 1'b1;
          dut.u_dmspu.u_sram.mem[dbl_word[d]][13 + 11] ^= 1'b1;
        end
        repeat (3 * int'(SRAM_WORDS)) @(posedge clk);
        running = 1'b0;
      end
      begin : instr_traffic
        while (running) begin
          int w;
          w = $urandom_range(0, int'(SRAM_WORDS) - 1);
          u_ci.xfer(1'b0, IMEM_BASE + 32'(w * 4), 0, rd, err);
          checks++;
          if (rd != pattern(w) || err) begin bad_reads++; failures++; end
        end
      end
      begin : data_traffic
        while (running) begin
          int w;
          logic [31:0] d;
          logic e;
          w = $urandom_range(16, int'(SRAM_WORDS) - 1);
          u_cd.xfer(1'b0, DMEM_BASE + 32'(w * 4), 0, d, e);
          checks++;
          if (d != ~pattern(w) || e) begin bad_reads++; failures++; end
        end
      end
    join
    $display("injected: tmr %p sram %p", tmr_hits, sram_hits);
    check(bad_reads == 0, "all data read during the run correct");
    // double errors
    check(de, "double-error pin up");
    for (int d = 0; d < NDOUBLE; d++) begin
      u_cd.xfer(1'b0, DMEM_BASE + 32'(dbl_word[d] * 4), 0, rd, err);
      check(err, "double-error word gives a bus error");
      u_cd.wr(DMEM_BASE + 32'(dbl_word[d] * 4), ~pattern(dbl_word[d]));
    end
    // counters
    for (int m = 0; m < NMOD; m++) begin
      u_dbg.xfer(1'b0, CTRL + 32'h100 + 32'(4 * m), 0, rd, err);
      $display("module %0d: TMR counter %0d, injected %0d", m, rd, tmr_hits[m]);
      check(rd == 32'(tmr_hits[m]), "TMR counter equals upsets injected into the module");
    end
    u_dbg.xfer(1'b0, IREGS + 32'hC, 0, rd, err);
    $display("I-MSPU scrub corrections %0d, injected %0d", rd, sram_hits[0]);
    check(rd == 32'(sram_hits[0]), "I-MSPU scrub count equals SRAM upsets");
    u_dbg.xfer(1'b0, DREGS + 32'hC, 0, rd, err);
    $display("D-MSPU scrub corrections %0d, injected %0d", rd, sram_hits[1]);
    check(rd == 32'(sram_hits[1]), "D-MSPU scrub count equals SRAM upsets");
    u_dbg.xfer(1'b0, DREGS + 32'h10, 0, rd, err);
    check(rd >= NDOUBLE, "D-MSPU double errors counted");
    u_dbg.xfer(1'b0, IREGS + 32'h10, 0, rd, err);
    check(rd == 0, "no double error in the I-MSPU");
    // after the rewrite a whole sweep must be clean
    u_cd.wr(CTRL + 32'h4, 2);
    u_cd.wr(DREGS + 32'h10, 0);
    repeat (2 * int'(SRAM_WORDS) + 10) @(posedge clk);
    u_dbg.xfer(1'b0, DREGS + 32'h10, 0, rd, err);
    check(rd == 0 && !de, "clean after software repair");
    for (int w = 0; w < 64; w++)
      check(dut.u_dmspu.u_sram.mem[w] == ecc_enc_word(~pattern(w)), "stored words clean");
    for (int m = 0; m < NMOD; m++) check(tmr_hits[m] > 0, "every module hit at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
