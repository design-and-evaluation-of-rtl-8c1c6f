// tb_triglav_top: the whole SoC at its full size, end to end.
//
// The clock runs at 250 MHz (4 ns). Behavioural OBI masters stand in for the
// CPU's instruction and data ports and for the debug unit; a behavioural
// memory stands in for the bootloader; an I2C controller model drives the
// I2C pins; the UART transmit line is looped back to its receive line.
// The test follows a session on the chip:
//  1. the data port clears both 32 kB memories (8192 words each);
//  2. a program image is written over I2C into the I-MSPU while the data port
//     and the debug port load the D-MSPU and the APB-RT at the same time
//     (crossbar arbitration), and the instruction port fetches it back;
//  3. both scrubbers are enabled at full rate: a traversal of a 32 kB memory
//     must take 8192 cycles, 32.8 us;
//  4. single upsets injected into the SRAMs are corrected on reads and by the
//     scrubbers, and counted by the MSPUs and by the per-module ECC counters;
//  5. a double error gives an OBI error and raises the de_o pin;
//  6. upsets injected into triplicated state of four modules are out-voted
//     and counted in each module's own TMR counter;
//  7. a timer interrupt goes through the PLIC to irq_o and is claimed;
//  8. a UART byte makes the round trip, GPIO pins follow their register;
//  9. the program return value is written: ret_o rises, retval_o holds it.
// Every mechanism is counted and must have happened at least once.
module tb_triglav_top;
  import triglav_pkg::*;
  localparam int H = 20;   // I2C SCL half period in clock cycles

  logic clk = 0, rst_n = 0;
  obi_req_t ci_req, cd_req, dbg_req, boot_req;
  obi_rsp_t ci_rsp, cd_rsp, dbg_rsp, boot_rsp;
  logic irq, tx, de, ret;
  logic [31:0] retval;
  logic [7:0] gi = '0, go, goe;
  logic scl_oe, sda_oe, m_scl_low = 0, m_sda_low = 0, scl, sda;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_contend = 0, n_i2c_wr = 0, n_obi_corr = 0, n_scrub_corr = 0, n_de = 0, n_tmr = 0;
  int n_irq = 0, n_uart = 0, n_gpio = 0, n_ret = 0, n_traverse = 0, n_stretch = 0;

  assign scl = !(m_scl_low || scl_oe);
  assign sda = !(m_sda_low || sda_oe);

  triglav_top dut (
    .clk, .rst_n,
    .cpu_instr_req_i(ci_req), .cpu_instr_rsp_o(ci_rsp),
    .cpu_data_req_i(cd_req), .cpu_data_rsp_o(cd_rsp),
    .dbg_req_i(dbg_req), .dbg_rsp_o(dbg_rsp),
    .i2c_scl_i(scl), .i2c_sda_i(sda), .i2c_scl_oe_o(scl_oe), .i2c_sda_oe_o(sda_oe),
    .boot_req_o(boot_req), .boot_rsp_i(boot_rsp),
    .irq_o(irq), .uart_tx_o(tx), .uart_rx_i(tx),
    .gpio_i(gi), .gpio_o(go), .gpio_oe_o(goe),
    .de_o(de), .ret_o(ret), .retval_o(retval)
  );

  tb_obi_master u_ci  (.clk, .req_o(ci_req),  .rsp_i(ci_rsp));
  tb_obi_master u_cd  (.clk, .req_o(cd_req),  .rsp_i(cd_rsp));
  tb_obi_master u_dbg (.clk, .req_o(dbg_req), .rsp_i(dbg_rsp));
  tb_obi_mem #(.SLOW(0)) u_boot (.clk, .req_i(boot_req), .rsp_o(boot_rsp));

  always #2 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    int nreq;
    nreq = int'(dut.m_req[0].req) + int'(dut.m_req[1].req) + int'(dut.m_req[2].req) + int'(dut.m_req[3].req);
    if (nreq >= 2) n_contend++;
    if (dut.i2c_req.req && dut.i2c_rsp.gnt && dut.i2c_req.we) n_i2c_wr++;
    if (scl_oe) n_stretch++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- I2C controller
  task automatic wait_cyc(input int k);
    repeat (k) @(posedge clk);
  endtask
  task automatic scl_high();
    m_scl_low = 0;
    @(posedge clk);
    while (!scl) @(posedge clk);
  endtask
  task automatic i2c_start();
    m_sda_low = 0;
    scl_high();
    wait_cyc(H);
    m_sda_low = 1;
    wait_cyc(H);
    m_scl_low = 1;
    wait_cyc(H);
  endtask
  task automatic i2c_stop();
    m_sda_low = 1;
    wait_cyc(H);
    scl_high();
    wait_cyc(H);
    m_sda_low = 0;
    wait_cyc(H);
  endtask
  task automatic put_bit(input logic b);
    m_sda_low = !b;
    wait_cyc(H / 2);
    scl_high();
    wait_cyc(H);
    m_scl_low = 1;
    wait_cyc(H / 2);
  endtask
  task automatic get_bit(output logic b);
    m_sda_low = 0;
    wait_cyc(H / 2);
    scl_high();
    wait_cyc(H / 2);
    b = sda;
    wait_cyc(H / 2);
    m_scl_low = 1;
    wait_cyc(H / 2);
  endtask
  task automatic put_byte(input logic [7:0] v, output logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) put_bit(v[i]);
    get_bit(b);
    ack = !b;
  endtask

  // ---------------------------------------------------------------- helpers
  localparam logic [31:0] CTRL  = APB_BASE + 32'(APB_SOCCTRL << 12);
  localparam logic [31:0] T0    = APB_BASE + 32'(APB_TIMER0 << 12);
  localparam logic [31:0] UART  = APB_BASE + 32'(APB_UART << 12);
  localparam logic [31:0] GPIO  = APB_BASE + 32'(APB_GPIO << 12);
  localparam logic [31:0] PLIC  = APB_BASE + 32'(APB_PLIC << 12);
  localparam logic [31:0] IREGS = APB_BASE + 32'(APB_IMSPU << 12);
  localparam logic [31:0] DREGS = APB_BASE + 32'(APB_DMSPU << 12);

  logic [31:0] rd;
  logic err, ack;
  logic [31:0] prog [8];
  logic [31:0] dref [64];

  task automatic rd_d(input logic [31:0] a, output logic [31:0] d);
    logic e;
    u_cd.xfer(1'b0, a, 0, d, e);
    check(!e, "no bus error");
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    logic [31:0] p0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- 1. clear both memories
    for (int w = 0; w < int'(SRAM_WORDS); w++) begin
      u_cd.wr(IMEM_BASE + 32'(w * 4), 0);
      u_cd.wr(DMEM_BASE + 32'(w * 4), 0);
    end
    check(dut.u_dmspu.u_sram.mem[SRAM_WORDS - 1] == '0 && dut.u_imspu.u_sram.mem[5] == '0, "memories cleared");
    // ---- 2. program over I2C while the other masters work
    for (int k = 0; k < 8; k++) prog[k] = $urandom;
    for (int k = 0; k < 64; k++) dref[k] = $urandom;
    fork
      begin
        i2c_start();
        put_byte({7'h50, 1'b0}, ack); check(ack, "I2C device acknowledged");
        put_byte(8'h00, ack); put_byte(8'h01, ack); put_byte(8'h01, ack); put_byte(8'h00, ack);
        for (int k = 0; k < 8; k++)
          for (int b = 3; b >= 0; b--) begin
            put_byte(prog[k][8*b +: 8], ack);
            check(ack, "I2C data acknowledged");
          end
        i2c_stop();
      end
      begin
        for (int r = 0; r < 40; r++)
          for (int k = 0; k < 64; k++) u_cd.wr(DMEM_BASE + 32'(k * 4), dref[k]);
      end
      begin
        for (int r = 0; r < 200; r++) begin
          u_dbg.xfer(1'b0, GPIO + 32'h4, 0, rd, err);
          u_dbg.xfer(1'b0, DMEM_BASE + 32'h100, 0, rd, err);
        end
      end
    join
    for (int k = 0; k < 8; k++) begin
      u_ci.xfer(1'b0, IMEM_BASE + 32'h100 + 32'(k * 4), 0, rd, err);
      check(rd == prog[k] && !err, "fetch of the program written over I2C");
    end
    for (int k = 0; k < 64; k++) begin
      rd_d(DMEM_BASE + 32'(k * 4), rd);
      check(rd == dref[k], "data memory");
    end
    // ---- 3. scrubbers at full rate
    u_cd.wr(IREGS + 32'h0, 1);
    u_cd.wr(DREGS + 32'h0, 1);
    p0 = dut.u_dmspu.s.passes;
    while (dut.u_dmspu.s.passes == p0) @(posedge clk);
    t0 = $time;
    @(posedge clk);
    while (dut.u_dmspu.s.passes == p0 + 1) @(posedge clk);
    t1 = $time;
    $display("D-MSPU traversal: %0d cycles, %0d ns", (t1 - t0) / 4, t1 - t0);
    check((t1 - t0) / 4 == int'(SRAM_WORDS), "one word per cycle: 8192 cycles per 32 kB");
    check(t1 - t0 <= 33000, "traversal within 33 us at 250 MHz");
    if ((t1 - t0) / 4 == int'(SRAM_WORDS)) n_traverse++;
    // ---- 4. single upsets in the SRAMs
    for (int k = 0; k < 6; k++) begin
      dut.u_dmspu.u_sram.mem[k * 3][k * 7] ^= 1'b1;
      dut.u_imspu.u_sram.mem[64 + k * 5][k * 8 + 1] ^= 1'b1;
    end
    u_cd.wr(DREGS + 32'h0, 0);
    rd_d(DMEM_BASE + 32'(3 * 4), rd);
    check(rd == dref[3], "OBI read corrects an upset");
    rd_d(DREGS + 32'h8, rd);
    check(rd == 1, "D-MSPU CORR_OBI");
    n_obi_corr += int'(rd);
    u_cd.wr(DREGS + 32'h0, 1);
    repeat (2 * int'(SRAM_WORDS) + 100) @(posedge clk);
    rd_d(DREGS + 32'hC, rd);
    check(rd == 6, "D-MSPU scrubber repaired all six (reads do not write back)");
    n_scrub_corr += int'(rd);
    rd_d(IREGS + 32'hC, rd);
    check(rd == 6, "I-MSPU scrubber corrected six");
    n_scrub_corr += int'(rd);
    check(dut.u_dmspu.u_sram.mem[0] == ecc_enc_word(dref[0]), "stored word repaired");
    rd_d(CTRL + 32'h200, rd);
    check(rd == 6, "ECC counter of the I-MSPU");
    rd_d(CTRL + 32'h204, rd);
    check(rd == 7, "ECC counter of the D-MSPU: one read, six scrubs");
    // ---- 5. double error
    check(!de, "de_o low");
    dut.u_dmspu.u_sram.mem[40][26] ^= 1'b1;
    dut.u_dmspu.u_sram.mem[40][30] ^= 1'b1;
    u_cd.xfer(1'b0, DMEM_BASE + 32'(40 * 4), 0, rd, err);
    check(err, "double error: bus error");
    @(negedge clk);
    check(de, "double error: de_o pin");
    if (de) n_de++;
    u_cd.wr(CTRL + 32'h4, 2);
    check(!de, "de_o cleared");
    u_cd.wr(DMEM_BASE + 32'(40 * 4), dref[40]);
    u_cd.wr(DREGS + 32'h0, 0);
    u_cd.wr(IREGS + 32'h0, 0);
    // ---- 6. TMR upsets, counted per module
    for (int k = 0; k < 4; k++) u_cd.wr(CTRL + 32'h100 + 32'(k * 4), 0);  // clear some
    u_cd.wr(CTRL + 32'h114, 0);
    u_cd.wr(CTRL + 32'h11C, 0);
    @(negedge clk);
    dut.u_xbar.u_state.r[2][0] ^= 1'b1;
    @(negedge clk);
    dut.u_timer0.u_state.r[1][5] ^= 1'b1;
    @(negedge clk);
    dut.u_uart.u_state.r[0][3] ^= 1'b1;
    @(negedge clk);
    dut.u_dmspu.u_state.r[1][2] ^= 1'b1;
    @(negedge clk);
    rd_d(CTRL + 32'h100, rd); check(rd == 1, "crossbar TMR counter");  n_tmr += int'(rd);
    rd_d(CTRL + 32'h108, rd); check(rd == 1, "D-MSPU TMR counter");    n_tmr += int'(rd);
    rd_d(CTRL + 32'h114, rd); check(rd == 1, "timer0 TMR counter");    n_tmr += int'(rd);
    rd_d(CTRL + 32'h11C, rd); check(rd == 1, "uart TMR counter");      n_tmr += int'(rd);
    rd_d(CTRL + 32'h104, rd); check(rd == 0, "I-MSPU TMR counter untouched");
    // ---- 7. timer interrupt through the PLIC
    u_cd.wr(PLIC + 32'h4, 32'h1);
    u_cd.wr(T0 + 32'hC, 100);
    u_cd.wr(T0 + 32'h0, 3'b111);
    t0 = $time;
    while (!irq) @(posedge clk);
    t1 = $time;
    check((t1 - t0) / 4 < 120, "timer match after CMP cycles");
    n_irq++;
    rd_d(PLIC + 32'h8, rd);
    check(rd == 1, "claim: timer0");
    u_cd.wr(T0 + 32'h0, 0);
    u_cd.wr(T0 + 32'h10, 1);
    // ---- 8. UART loopback and GPIO
    u_cd.wr(UART + 32'hC, 7);
    u_cd.wr(UART + 32'h0, 32'h5A);
    repeat (120) @(posedge clk);
    rd_d(UART + 32'h8, rd);
    check(rd[1], "UART byte received");
    rd_d(UART + 32'h4, rd);
    check(rd == 32'h5A, "UART loopback byte");
    if (rd == 32'h5A) n_uart++;
    u_cd.wr(GPIO + 32'h0, 32'hA5);
    u_cd.wr(GPIO + 32'h4, 32'hFF);
    check(go == 8'hA5 && goe == 8'hFF, "GPIO pins");
    if (go == 8'hA5) n_gpio++;
    // ---- 9. program return
    check(!ret, "ret_o low before return");
    u_cd.wr(CTRL + 32'h0, 32'h0000_0000);
    check(ret && retval == 0, "program return");
    if (ret) n_ret++;
    u_dbg.xfer(1'b0, CTRL + 32'h4, 0, rd, err);
    check(rd[0] == 1'b1, "debug port reads STATUS");

    $display("contend=%0d i2c_wr=%0d stretch=%0d traverse=%0d obi_corr=%0d scrub_corr=%0d de=%0d tmr=%0d irq=%0d uart=%0d gpio=%0d ret=%0d",
             n_contend, n_i2c_wr, n_stretch, n_traverse, n_obi_corr, n_scrub_corr, n_de, n_tmr, n_irq, n_uart, n_gpio, n_ret);
    check(n_contend > 0, "mechanism: crossbar arbitration");
    check(n_i2c_wr == 8, "mechanism: OBI writes from I2C");
    check(n_traverse > 0, "mechanism: full scrub traversal");
    check(n_obi_corr > 0, "mechanism: ECC correction on read");
    check(n_scrub_corr > 0, "mechanism: scrub correction");
    check(n_de > 0, "mechanism: double error");
    check(n_tmr == 4, "mechanism: TMR upsets");
    check(n_irq > 0 && n_uart > 0 && n_gpio > 0 && n_ret > 0, "mechanism: peripherals and return");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
