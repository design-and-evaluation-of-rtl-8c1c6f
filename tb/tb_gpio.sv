// tb_gpio: output, output-enable, synchronised input and interrupt of the GPIO.
module tb_gpio;
  import triglav_pkg::*;
  logic clk = 0, rst_n = 0;
  apb_req_t areq;
  apb_rsp_t arsp;
  logic [7:0] gi = '0, go, goe;
  logic irq, terr;
  int checks = 0, failures = 0;

  gpio #(.N(8)) dut (.clk, .rst_n, .apb_req_i(areq), .apb_rsp_o(arsp), .gpio_i(gi), .gpio_o(go),
                     .gpio_oe_o(goe), .irq_o(irq), .tmr_err_o(terr));
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(go == 0 && goe == 0 && !irq, "reset");
    for (int k = 0; k < 20; k++) begin
      logic [7:0] o, e, i;
      o = 8'($urandom); e = 8'($urandom); i = 8'($urandom);
      apb_wr(12'h000, 32'(o));
      apb_wr(12'h004, 32'(e));
      check(go == o && goe == e, "outputs");
      gi = i;
      @(negedge clk);
      apb_rd(12'h008, v);
      check(v == 32'(i), "input read after synchroniser");
    end
    apb_wr(12'h00C, 32'h10);
    gi = 8'h00;
    repeat (3) @(negedge clk);
    check(!irq, "no irq");
    gi = 8'h10;
    @(negedge clk);
    check(!irq, "irq waits for the synchroniser");
    @(negedge clk);
    check(irq, "irq after two flops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
