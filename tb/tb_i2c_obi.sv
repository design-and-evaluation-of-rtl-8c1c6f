// tb_i2c_obi: an I2C controller model writes and reads memory through the
// I2C target and its OBI master port.
//
// The lines are open-drain with pull-ups (wired AND of controller and
// target). The controller honours clock stretching. The memory behind the
// OBI port is the slow testbench slave, so the target has to stretch SCL
// while a read is under way. Checked: acknowledge of the right device
// address and not-acknowledge of another, words written land in memory at
// the right addresses, a read after a repeated START returns them most
// significant byte first over several words, and the OBI request rule (held
// until granted). Stretching and both OBI directions must each happen.
module tb_i2c_obi;
  import triglav_pkg::*;
  localparam int H = 20;   // SCL half period in clock cycles

  logic clk = 0, rst_n = 0;
  logic m_scl_low = 0, m_sda_low = 0;
  logic scl_oe, sda_oe, scl, sda, terr;
  obi_req_t oreq;
  obi_rsp_t orsp;
  int checks = 0, failures = 0;
  int n_stretch = 0, n_wr = 0, n_rd = 0;

  assign scl = !(m_scl_low || scl_oe);
  assign sda = !(m_sda_low || sda_oe);

  i2c_obi #(.DEV_ADDR(7'h50)) dut (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .scl_oe_o(scl_oe), .sda_oe_o(sda_oe),
    .obi_req_o(oreq), .obi_rsp_i(orsp), .tmr_err_o(terr)
  );
  tb_obi_mem #(.SLOW(1)) u_mem (.clk, .req_i(oreq), .rsp_o(orsp));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (scl_oe) n_stretch++;
    if (rst_n && oreq.req && orsp.gnt) begin
      if (oreq.we) n_wr++;
      else n_rd++;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) oreq.req && !orsp.gnt |=> oreq.req && $stable(oreq));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wait_cyc(input int k);
    repeat (k) @(posedge clk);
  endtask

  task automatic scl_high();
    m_scl_low = 0;
    @(posedge clk);
    while (!scl) @(posedge clk);   // clock stretching
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

  task automatic get_byte(output logic [7:0] v, input logic ack);
    for (int i = 7; i >= 0; i--) get_bit(v[i]);
    put_bit(!ack);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ack;
  logic [7:0] by;
  logic [31:0] words [3] = '{32'hDEAD_BEEF, 32'h0123_4567, 32'hA5C3_1E70};
  logic [31:0] w;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_cyc(10);
    // ---- write three words at 0x40
    i2c_start();
    put_byte({7'h50, 1'b0}, ack); check(ack, "device address acknowledged");
    put_byte(8'h00, ack); put_byte(8'h00, ack); put_byte(8'h00, ack); put_byte(8'h40, ack);
    check(ack, "address bytes acknowledged");
    for (int k = 0; k < 3; k++)
      for (int b = 3; b >= 0; b--) begin
        put_byte(words[k][8*b +: 8], ack);
        check(ack, "data acknowledged");
      end
    i2c_stop();
    wait_cyc(20);
    for (int k = 0; k < 3; k++) check(u_mem.mem[16 + k] == words[k], "word written by OBI");
    // ---- set the pointer, repeated start, read three words
    i2c_start();
    put_byte({7'h50, 1'b0}, ack);
    put_byte(8'h00, ack); put_byte(8'h00, ack); put_byte(8'h00, ack); put_byte(8'h40, ack);
    m_sda_low = 0;
    wait_cyc(H / 2);
    i2c_start();
    put_byte({7'h50, 1'b1}, ack); check(ack, "read address acknowledged");
    for (int k = 0; k < 3; k++) begin
      for (int b = 3; b >= 0; b--) begin
        get_byte(by, !(k == 2 && b == 0));
        w[8*b +: 8] = by;
      end
      check(w == words[k], "word read back");
    end
    i2c_stop();
    // ---- other device
    i2c_start();
    put_byte({7'h51, 1'b0}, ack); check(!ack, "other device not acknowledged");
    i2c_stop();
    $display("stretch=%0d obi_wr=%0d obi_rd=%0d", n_stretch, n_wr, n_rd);
    check(n_stretch > 0, "clock stretching happened");
    check(n_wr == 3 && n_rd >= 3, "OBI transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
