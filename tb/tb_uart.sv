// tb_uart: transmit and receive of the UART at DIV = 7 (8 cycles per bit).
//
// The transmit line is sampled in the middle of each bit by the testbench and
// the frame (start bit, 8 data bits LSB first, stop bit) and its length are
// checked. Frames driven onto rx_i must be received, set RX valid and raise
// the interrupt; a second frame before the first is read must flag overrun.
module tb_uart;
  import triglav_pkg::*;
  localparam int BIT = 8;
  logic clk = 0, rst_n = 0;
  apb_req_t areq;
  apb_rsp_t arsp;
  logic tx, rx = 1, irq, terr;
  int checks = 0, failures = 0;

  uart dut (.clk, .rst_n, .apb_req_i(areq), .apb_rsp_o(arsp), .tx_o(tx), .rx_i(rx), .irq_o(irq), .tmr_err_o(terr));
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


  task automatic send_rx(input logic [7:0] b);
    rx = 0;
    repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (BIT) @(negedge clk);
    end
    rx = 1;
    repeat (BIT) @(negedge clk);
  endtask

  logic [31:0] v;
  logic [7:0] got;
  int t0, t1;
  initial begin
    areq = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    apb_rd(12'h00C, v);
    check(v == 2169, "reset divisor");
    apb_wr(12'h00C, BIT - 1);
    for (int k = 0; k < 6; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      fork
        apb_wr(12'h000, 32'(b));
        begin
          while (tx) @(posedge clk);
          t0 = $time;
          repeat (BIT / 2) @(posedge clk);
          check(!tx, "start bit");
          for (int i = 0; i < 8; i++) begin
            repeat (BIT) @(posedge clk);
            got[i] = tx;
          end
          repeat (BIT) @(posedge clk);
          check(tx, "stop bit");
        end
      join
      check(got == b, "tx byte");
      while (dut.s.tx_busy) @(posedge clk);
      t1 = $time;
      check((t1 - t0) / 10 == 10 * BIT, "frame lasts 10 bits");
      b = 8'($urandom);
      send_rx(b);
      check(irq, "rx irq");
      apb_rd(12'h004, v);
      check(v == 32'(b), "rx byte");
      check(!irq, "rx valid cleared by read");
    end
    send_rx(8'h11);
    send_rx(8'h22);
    apb_rd(12'h008, v);
    check(v[2:1] == 2'b11, "overrun flagged");
    apb_rd(12'h004, v);
    check(v == 32'h22, "latest byte kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
