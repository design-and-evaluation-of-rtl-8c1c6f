// tb_soc_ctrl: upset counters, double-error flag and program return.
//
// Random pulses on the TMR error and ECC correction inputs are counted here
// too and the counters must match, per module. A double-error pulse must set
// de_o (sticky until cleared) and count. Writing RETURN must set ret_o and
// hold the value. Counter clear by write is checked, and an upset in one copy
// of the block's own state must be out-voted.
module tb_soc_ctrl;
  import triglav_pkg::*;
  localparam int NTMR = 5, NECC = 3;
  logic clk = 0, rst_n = 0;
  apb_req_t areq;
  apb_rsp_t arsp;
  logic [NTMR-1:0] terr_in = '0;
  logic [NECC-1:0] ecc_in = '0;
  logic de_in = 0, de, ret, terr;
  logic [31:0] retval;
  int checks = 0, failures = 0;
  int exp_t [NTMR], exp_e [NECC];

  soc_ctrl #(.NTMR(NTMR), .NECC(NECC)) dut (
    .clk, .rst_n, .apb_req_i(areq), .apb_rsp_o(arsp), .tmr_err_i(terr_in), .ecc_corr_i(ecc_in),
    .de_i(de_in), .de_o(de), .ret_o(ret), .retval_o(retval), .tmr_err_o(terr)
  );
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  logic [31:0] v;
  initial begin
    areq = '0;
    for (int i = 0; i < NTMR; i++) exp_t[i] = 0;
    for (int i = 0; i < NECC; i++) exp_e[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!de && !ret, "reset state");
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      terr_in = NTMR'($urandom);
      ecc_in  = NECC'($urandom);
      for (int i = 0; i < NTMR; i++) exp_t[i] += int'(terr_in[i]);
      for (int i = 0; i < NECC; i++) exp_e[i] += int'(ecc_in[i]);
    end
    @(negedge clk);
    terr_in = '0; ecc_in = '0;
    for (int i = 0; i < NTMR; i++) begin
      apb_rd(12'h100 + 12'(4 * i), v);
      check(v == 32'(exp_t[i]), "TMR counter");
    end
    for (int i = 0; i < NECC; i++) begin
      apb_rd(12'h200 + 12'(4 * i), v);
      check(v == 32'(exp_e[i]), "ECC counter");
    end
    apb_wr(12'h104, 0);
    apb_rd(12'h104, v);
    check(v == 0, "counter cleared");
    apb_rd(12'h100, v);
    check(v == 32'(exp_t[0]), "other counter kept");
    // double error
    check(!de, "no DE yet");
    @(negedge clk); de_in = 1;
    @(negedge clk); de_in = 0;
    check(de, "DE flag set");
    repeat (5) @(negedge clk);
    check(de, "DE flag sticky");
    apb_rd(12'h008, v);
    check(v == 1, "DE count");
    apb_wr(12'h004, 2);
    check(!de, "DE flag cleared");
    // program return
    apb_wr(12'h000, 32'hC0DE_0001);
    check(ret && retval == 32'hC0DE_0001, "program return");
    apb_rd(12'h004, v);
    check(v == 1, "STATUS");
    // upset in own state
    dut.u_state.r[1][40] = ~dut.u_state.r[1][40];
    #1 check(terr && retval == 32'hC0DE_0001 && ret, "own upset out-voted");
    @(negedge clk);
    check(!terr, "own upset repaired");
    apb_wr(12'h004, 1);
    check(!ret, "ret cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
