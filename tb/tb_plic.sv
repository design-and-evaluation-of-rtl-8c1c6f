// tb_plic: edge capture, enable masking and claim order of the PLIC.
module tb_plic;
  import triglav_pkg::*;
  logic clk = 0, rst_n = 0;
  apb_req_t areq;
  apb_rsp_t arsp;
  logic [3:0] src = '0;
  logic irq, terr;
  int checks = 0, failures = 0;

  plic #(.NSRC(4)) dut (.clk, .rst_n, .apb_req_i(areq), .apb_rsp_o(arsp), .src_i(src), .irq_o(irq), .tmr_err_o(terr));
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
    @(negedge clk); src = 4'b1010;
    @(negedge clk); src = 4'b0000;
    @(negedge clk);
    apb_rd(12'h000, v);
    check(v == 32'hA, "pending captured from edges");
    check(!irq, "nothing enabled");
    apb_wr(12'h004, 32'h8);
    check(irq, "irq with source 3 enabled");
    apb_wr(12'h004, 32'hF);
    apb_rd(12'h008, v);
    check(v == 2, "claim lowest: source 1");
    apb_rd(12'h008, v);
    check(v == 4, "claim next: source 3");
    check(!irq, "all claimed");
    apb_rd(12'h008, v);
    check(v == 0, "nothing to claim");
    @(negedge clk); src = 4'b0001;
    repeat (5) @(negedge clk);
    apb_rd(12'h000, v);
    check(v == 1, "level held: one edge, one pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
