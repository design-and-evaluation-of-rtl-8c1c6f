// triglav_top: the TriglaV microcontroller SoC without its CPU.
//
// A 4 x 4 OBI crossbar joins the masters (Ibex instruction port, Ibex data
// port, JTAG debug, and the I2C target, through which an external controller
// loads and configures the chip) to the slaves (bootloader, I-MSPU with 32 kB of
// instruction SRAM, D-MSPU with 32 kB of data SRAM, and the APB-RT bridge).
// Behind the APB-RT sit the SoC control block with the upset counters, two
// timers, a UART, GPIO, the PLIC and the configuration registers of both
// MSPUs. This is the architecture of the document's block diagram. The CPU,
// the JTAG debug unit and the bootloader are not part of
// this RTL, so their OBI ports are ports of this module; irq_o goes to the
// CPU. The I2C interface is part of it (i2c_obi).
//
// Upset observability: every triplicated block reports disagreement of its
// copies and every ECC-protected block reports corrections to soc_ctrl, which
// counts them per module. TMR counter index: 0 crossbar, 1 I-MSPU, 2 D-MSPU,
// 3 APB-RT bridge, 4 soc_ctrl, 5 timer0, 6 timer1, 7 uart, 8 gpio, 9 plic,
// 10 I2C.
// ECC counter index: 0 I-MSPU, 1 D-MSPU, 2 APB-RT read data, 3 APB-RT
// address/write data at the peripherals. Double errors from any of them set
// de_o. The program return pin ret_o and retval_o come from soc_ctrl.
// Address map: bootloader 0x0000_0000, I-MSPU 0x0001_0000, D-MSPU
// 0x0002_0000, APB-RT 0x1000_0000 with 4 KiB per peripheral in the order
// soc_ctrl, timer0, timer1, uart, gpio, plic, I-MSPU regs, D-MSPU regs
// (this design's choice).
//
// Lint may report a circular path through s_rsp. It is not a real loop: the
// crossbar's slave requests depend on the slaves' rvalid (registered) and the
// MSPU's gnt depends on its request, but the tool sees the packed response
// array as one signal.
module triglav_top
  import triglav_pkg::*;
#(
  parameter int unsigned MEM_WORDS = SRAM_WORDS,
  parameter int unsigned NGPIO     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // OBI masters outside this RTL
  input  obi_req_t         cpu_instr_req_i,
  output obi_rsp_t         cpu_instr_rsp_o,
  input  obi_req_t         cpu_data_req_i,
  output obi_rsp_t         cpu_data_rsp_o,
  input  obi_req_t         dbg_req_i,
  output obi_rsp_t         dbg_rsp_o,
  // I2C (open drain: *_oe_o = 1 pulls the line low)
  input  logic             i2c_scl_i,
  input  logic             i2c_sda_i,
  output logic             i2c_scl_oe_o,
  output logic             i2c_sda_oe_o,
  // bootloader slave outside this RTL
  output obi_req_t         boot_req_o,
  input  obi_rsp_t         boot_rsp_i,
  // interrupt to the CPU
  output logic             irq_o,
  // peripherals
  output logic             uart_tx_o,
  input  logic             uart_rx_i,
  input  logic [NGPIO-1:0] gpio_i,
  output logic [NGPIO-1:0] gpio_o,
  output logic [NGPIO-1:0] gpio_oe_o,
  // observability
  output logic             de_o,
  output logic             ret_o,
  output logic [31:0]      retval_o
);
  localparam int unsigned NTMR = 11;
  localparam int unsigned NECC = 4;

  logic [NTMR-1:0] tmr_err;
  logic [NECC-1:0] ecc_corr;

  // ---------------------------------------------------------------- OBI crossbar
  obi_req_t [3:0] m_req, s_req;
  obi_rsp_t [3:0] m_rsp, s_rsp;
  obi_req_t       i2c_req;
  obi_rsp_t       i2c_rsp;

  i2c_obi u_i2c (
    .clk, .rst_n, .scl_i(i2c_scl_i), .sda_i(i2c_sda_i), .scl_oe_o(i2c_scl_oe_o),
    .sda_oe_o(i2c_sda_oe_o), .obi_req_o(i2c_req), .obi_rsp_i(i2c_rsp), .tmr_err_o(tmr_err[10])
  );

  assign m_req = {i2c_req, dbg_req_i, cpu_data_req_i, cpu_instr_req_i};
  assign cpu_instr_rsp_o = m_rsp[0];
  assign cpu_data_rsp_o  = m_rsp[1];
  assign dbg_rsp_o       = m_rsp[2];
  assign i2c_rsp         = m_rsp[3];

  obi_xbar #(.NM(4), .NS(4)) u_xbar (
    .clk, .rst_n, .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(s_req), .s_rsp_i(s_rsp),
    .tmr_err_o(tmr_err[0])
  );

  assign boot_req_o = s_req[0];
  assign s_rsp[0]   = boot_rsp_i;

  // ---------------------------------------------------------------- APB-RT
  apbrt_req_t [APB_NSLV-1:0] rt_req;
  apbrt_rsp_t [APB_NSLV-1:0] rt_rsp;
  apb_req_t   [APB_NSLV-1:0] p_req;
  apb_rsp_t   [APB_NSLV-1:0] p_rsp;
  logic       [APB_NSLV-1:0] slv_corr, slv_de;
  logic                      br_de;

  apb_rt_bridge #(.NSLV(APB_NSLV)) u_apb (
    .clk, .rst_n, .obi_req_i(s_req[3]), .obi_rsp_o(s_rsp[3]),
    .apb_req_o(rt_req), .apb_rsp_i(rt_rsp),
    .ecc_corr_o(ecc_corr[2]), .ecc_de_o(br_de), .tmr_err_o(tmr_err[3])
  );

  for (genvar k = 0; k < APB_NSLV; k++) begin : g_slv
    apbrt_slv u_slv (
      .rt_req_i(rt_req[k]), .rt_rsp_o(rt_rsp[k]), .apb_req_o(p_req[k]), .apb_rsp_i(p_rsp[k]),
      .ecc_corr_o(slv_corr[k]), .ecc_de_o(slv_de[k])
    );
  end
  assign ecc_corr[3] = |slv_corr;

  // ---------------------------------------------------------------- MSPUs
  logic imem_de, dmem_de;

  mspu #(.WORDS(MEM_WORDS)) u_imspu (
    .clk, .rst_n, .obi_req_i(s_req[1]), .obi_rsp_o(s_rsp[1]),
    .apb_req_i(p_req[APB_IMSPU]), .apb_rsp_o(p_rsp[APB_IMSPU]),
    .de_o(imem_de), .corr_o(ecc_corr[0]), .tmr_err_o(tmr_err[1])
  );

  mspu #(.WORDS(MEM_WORDS)) u_dmspu (
    .clk, .rst_n, .obi_req_i(s_req[2]), .obi_rsp_o(s_rsp[2]),
    .apb_req_i(p_req[APB_DMSPU]), .apb_rsp_o(p_rsp[APB_DMSPU]),
    .de_o(dmem_de), .corr_o(ecc_corr[1]), .tmr_err_o(tmr_err[2])
  );

  // ---------------------------------------------------------------- peripherals
  logic t0_irq, t1_irq, uart_irq, gpio_irq;

  soc_ctrl #(.NTMR(NTMR), .NECC(NECC)) u_ctrl (
    .clk, .rst_n, .apb_req_i(p_req[APB_SOCCTRL]), .apb_rsp_o(p_rsp[APB_SOCCTRL]),
    .tmr_err_i(tmr_err), .ecc_corr_i(ecc_corr),
    .de_i(imem_de | dmem_de | br_de | (|slv_de)),
    .de_o, .ret_o, .retval_o, .tmr_err_o(tmr_err[4])
  );

  timer u_timer0 (
    .clk, .rst_n, .apb_req_i(p_req[APB_TIMER0]), .apb_rsp_o(p_rsp[APB_TIMER0]),
    .irq_o(t0_irq), .tmr_err_o(tmr_err[5])
  );

  timer u_timer1 (
    .clk, .rst_n, .apb_req_i(p_req[APB_TIMER1]), .apb_rsp_o(p_rsp[APB_TIMER1]),
    .irq_o(t1_irq), .tmr_err_o(tmr_err[6])
  );

  uart u_uart (
    .clk, .rst_n, .apb_req_i(p_req[APB_UART]), .apb_rsp_o(p_rsp[APB_UART]),
    .tx_o(uart_tx_o), .rx_i(uart_rx_i), .irq_o(uart_irq), .tmr_err_o(tmr_err[7])
  );

  gpio #(.N(NGPIO)) u_gpio (
    .clk, .rst_n, .apb_req_i(p_req[APB_GPIO]), .apb_rsp_o(p_rsp[APB_GPIO]),
    .gpio_i, .gpio_o, .gpio_oe_o, .irq_o(gpio_irq), .tmr_err_o(tmr_err[8])
  );

  plic #(.NSRC(4)) u_plic (
    .clk, .rst_n, .apb_req_i(p_req[APB_PLIC]), .apb_rsp_o(p_rsp[APB_PLIC]),
    .src_i({gpio_irq, uart_irq, t1_irq, t0_irq}), .irq_o, .tmr_err_o(tmr_err[9])
  );
endmodule
