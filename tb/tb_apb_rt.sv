// tb_apb_rt: OBI to APB-RT bridge and four APB-RT slave ports.
//
// Register-file peripherals sit behind the slave ports (slots 0 and 2 answer
// at once, 1 and 3 insert random wait states). Random OBI reads and writes are
// checked against a reference; for a zero-wait slot the response must come
// exactly three cycles after the grant. Between bridge and slaves the test can
// flip bits on the protected bus: one bit of address, write data or read
// data (must be corrected and counted), one copy of a triplicated control
// signal (must be out-voted), and two bits in one byte of write data or read
// data (must end as an OBI error; the corrupted write must not happen).
// Accesses to an unmapped slot and to a register the peripheral refuses must
// come back with err.
module tb_apb_rt;
  import triglav_pkg::*;
  localparam int NSLV = 4;

  logic clk = 0, rst_n = 0;
  obi_req_t oreq;
  obi_rsp_t orsp;
  apbrt_req_t [NSLV-1:0] rt_req, rt_req_x;
  apbrt_rsp_t [NSLV-1:0] rt_rsp, rt_rsp_x;
  apb_req_t [NSLV-1:0] p_req;
  apb_rsp_t [NSLV-1:0] p_rsp;
  logic [NSLV-1:0] s_corr, s_de;
  logic b_corr, b_de, terr;
  int checks = 0, failures = 0;
  int n_bcorr = 0, n_scorr = 0, n_sde = 0, n_bde = 0;

  // fault injection on the bus
  logic [51:0] f_addr = '0, f_wdata = '0, f_rdata = '0;
  logic [2:0]  f_psel = '0, f_pready = '0;

  apb_rt_bridge #(.NSLV(NSLV)) dut (
    .clk, .rst_n, .obi_req_i(oreq), .obi_rsp_o(orsp), .apb_req_o(rt_req), .apb_rsp_i(rt_rsp_x),
    .ecc_corr_o(b_corr), .ecc_de_o(b_de), .tmr_err_o(terr)
  );

  for (genvar k = 0; k < NSLV; k++) begin : g_s
    always_comb begin
      rt_req_x[k]        = rt_req[k];
      rt_req_x[k].paddr  = rt_req[k].paddr ^ f_addr;
      rt_req_x[k].pwdata = rt_req[k].pwdata ^ f_wdata;
      rt_req_x[k].psel   = rt_req[k].psel ^ (rt_req[k].psel[0] ? f_psel : 3'b000);
      rt_rsp_x[k]        = rt_rsp[k];
      rt_rsp_x[k].prdata = rt_rsp[k].prdata ^ f_rdata;
      rt_rsp_x[k].pready = rt_rsp[k].pready ^ f_pready;
    end
    apbrt_slv u_slv (
      .rt_req_i(rt_req_x[k]), .rt_rsp_o(rt_rsp[k]), .apb_req_o(p_req[k]), .apb_rsp_i(p_rsp[k]),
      .ecc_corr_o(s_corr[k]), .ecc_de_o(s_de[k])
    );
    tb_apb_regs #(.WAIT(k % 2 == 1)) u_regs (.clk, .req_i(p_req[k]), .rsp_o(p_rsp[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (b_corr) n_bcorr++;
    if (b_de) n_bde++;
    if (s_corr != 0) n_scorr++;
    if (s_de != 0) n_sde++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] refm [NSLV][16];

  task automatic obi(input logic we, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output logic err, output int lat);
    @(negedge clk);
    oreq = '{req: 1'b1, we: we, be: 4'hF, addr: a, wdata: wd};
    @(posedge clk);
    while (!orsp.gnt) @(posedge clk);
    @(negedge clk);
    oreq = '0;
    lat = 0;
    while (!orsp.rvalid) begin
      @(negedge clk);
      lat++;
    end
    lat++;
    rd  = orsp.rdata;
    err = orsp.err;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rd, wd, a;
  logic err;
  int lat, sl, r;

  initial begin
    oreq = '0;
    for (int k = 0; k < NSLV; k++) for (int i = 0; i < 16; i++) refm[k][i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      logic we;
      int kind;
      sl = $urandom_range(0, NSLV - 1);
      r  = $urandom_range(0, 15);
      a  = APB_BASE + 32'(sl << 12) + 32'(r * 4);
      we = $urandom_range(0, 1) == 1;
      wd = $urandom;
      kind = (n < 200) ? 0 : $urandom_range(0, 7);
      f_addr = '0; f_wdata = '0; f_rdata = '0; f_psel = '0; f_pready = '0;
      case (kind)
        1: f_addr[$urandom_range(0, 51)] = 1'b1;
        2: f_wdata[$urandom_range(0, 51)] = 1'b1;
        3: f_rdata[$urandom_range(0, 51)] = 1'b1;
        4: f_psel[$urandom_range(0, 2)] = 1'b1;
        5: f_pready[$urandom_range(0, 2)] = 1'b1;
        6: begin f_wdata[13] = 1'b1; f_wdata[17] = 1'b1; we = 1'b1; end
        7: begin f_rdata[0] = 1'b1; f_rdata[5] = 1'b1; we = 1'b0; end
        default: ;
      endcase
      obi(we, a, wd, rd, err, lat);
      if (kind == 6) begin
        check(err, "double error in write data refused");
      end else if (kind == 7) begin
        check(err, "double error in read data flagged");
      end else begin
        check(!err, "no error");
        if (we) refm[sl][r] = wd;
        else check(rd == refm[sl][r], "read data");
      end
      if (sl % 2 == 0 && kind != 5) check(lat == 3, "zero-wait latency: rvalid 3 cycles after grant");
    end
    f_addr = '0; f_wdata = '0; f_rdata = '0; f_psel = '0; f_pready = '0;
    for (int k = 0; k < NSLV; k++) for (int i = 0; i < 16; i++) begin
      obi(0, APB_BASE + 32'(k << 12) + 32'(i * 4), 0, rd, err, lat);
      check(rd == refm[k][i], "final contents");
    end
    obi(0, APB_BASE + 32'h0000_5000, 0, rd, err, lat);
    check(err, "unmapped slot");
    obi(1, APB_BASE + 32'h0000_2080, 1, rd, err, lat);
    check(err, "peripheral error passed on");
    $display("bridge corr=%0d de=%0d slave corr=%0d de=%0d", n_bcorr, n_bde, n_scorr, n_sde);
    check(n_bcorr > 0 && n_bde > 0 && n_scorr > 0 && n_sde > 0, "ECC counters pulsed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
