// tb_tmr_reg: checks the triplicated register and its self-correction.
//
// The register is used as a counter (d = q + 1), as the SoC uses it: the next
// value is computed from the voted output. Random single-copy upsets are
// injected by flipping bits of one copy between clock edges. The voted output
// and all three voted copies must stay on the expected count, err_o must be
// high in the cycle after an upset and low again one cycle later (the copy is
// repaired at the next edge). Two copies hit in the same bit must show up as
// a wrong voted value, which proves the voter follows the majority.
module tb_tmr_reg;
  logic clk = 0, rst_n = 0;
  logic [15:0] d, q;
  logic [2:0][15:0] q3;
  logic err;
  int checks = 0, failures = 0;
  logic [15:0] expect_q;

  tmr_reg #(.W(16), .RST(16'h1234)) dut (.clk, .rst_n, .d_i(d), .q_o(q), .q3_o(q3), .err_o(err));

  always #5 clk = ~clk;
  assign d = q + 16'd1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0t q=%h exp=%h err=%b", what, $time, q, expect_q, err);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 check(q == 16'h1234 && err == 0, "reset value");
    rst_n = 1;
    expect_q = 16'h1234;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      expect_q++;
      check(q == expect_q && q3[0] == expect_q && q3[1] == expect_q && q3[2] == expect_q && !err, "count");
      if (i % 7 == 3) begin
        int c, b;
        c = $urandom_range(0, 2);
        b = $urandom_range(0, 15);
        dut.r[c][b] = ~dut.r[c][b];
        #1;
        check(err, "err after upset");
        check(q == expect_q && q3[0] == expect_q && q3[1] == expect_q && q3[2] == expect_q, "voted after upset");
      end
    end
    // two copies upset in the same bit: majority flips
    @(posedge clk); #1;
    expect_q++;
    dut.r[0][3] = ~dut.r[0][3];
    dut.r[2][3] = ~dut.r[2][3];
    #1;
    check(q == (expect_q ^ 16'h0008) && err, "double upset wins the vote");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
