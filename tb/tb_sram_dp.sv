// tb_sram_dp: checks the dual-port SRAM against a reference array.
//
// Random reads and writes with random lane enables run on both ports at the
// same time (never a write on both ports to the same word). Each read must
// return the reference content one cycle after the address.
module tb_sram_dp;
  localparam int DEPTH = 64;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [3:0] a_be, b_be;
  logic [5:0] a_addr, b_addr;
  logic [51:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [51:0] refm [DEPTH];
  logic [51:0] a_exp, b_exp;
  logic a_chk, b_chk;
  int checks = 0, failures = 0;

  sram_dp #(.DEPTH(DEPTH), .LANE(13), .NLANE(4)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [51:0] merge(logic [51:0] old, logic [51:0] nw, logic [3:0] be);
    logic [51:0] r;
    r = old;
    for (int l = 0; l < 4; l++) if (be[l]) r[13*l +: 13] = nw[13*l +: 13];
    return r;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_chk = 0; b_chk = 0;
    a_be = '0; b_be = '0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // initialise
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_be = 4'hF; a_addr = 6'(i);
      a_wdata = {$urandom, $urandom} & 52'hF_FFFF_FFFF_FFFF;
      refm[i] = a_wdata;
    end
    @(negedge clk); a_en = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      if (a_chk) begin checks++; if (a_rdata != a_exp) begin failures++; $display("FAIL A"); end end
      if (b_chk) begin checks++; if (b_rdata != b_exp) begin failures++; $display("FAIL B"); end end
      a_en = 1; a_we = $urandom_range(0, 1) == 1; a_addr = 6'($urandom); a_be = 4'($urandom);
      b_en = 1; b_we = $urandom_range(0, 1) == 1; b_addr = 6'($urandom); b_be = 4'($urandom);
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      if ((a_we && !b_we && a_addr == b_addr) || (b_we && !a_we && a_addr == b_addr)) begin
        a_we = 0; b_we = 0;   // read-during-write on the other port: not checked
      end
      a_wdata = {$urandom, $urandom} & 52'hF_FFFF_FFFF_FFFF;
      b_wdata = {$urandom, $urandom} & 52'hF_FFFF_FFFF_FFFF;
      a_chk = !a_we; a_exp = refm[a_addr];
      b_chk = !b_we; b_exp = refm[b_addr];
      if (a_we) refm[a_addr] = merge(refm[a_addr], a_wdata, a_be);
      if (b_we) refm[b_addr] = merge(refm[b_addr], b_wdata, b_be);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
