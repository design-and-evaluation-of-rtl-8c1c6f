// tmr_reg: fully protected triple-modular-redundant register.
//
// Three copies of a W-bit register each feed their own majority voter (the
// voters are triplicated too). q_o is the voted value of voter 0 and q3_o
// holds all three voted copies. The caller computes the next value d_i from
// the voted q_o, so a single upset in one copy is out-voted at once and
// overwritten at the next clock edge: the self-correction within one cycle
// that the document describes. err_o is high while the three copies disagree;
// it is the pulse that the TMR error counters count. Synchronous to clk,
// asynchronous active-low reset to RST (reset style is this design's choice).
module tmr_reg #(
  parameter int unsigned W   = 8,
  parameter logic [W-1:0] RST = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      d_i,
  output logic [W-1:0]      q_o,
  output logic [2:0][W-1:0] q3_o,
  output logic              err_o
);
  logic [2:0][W-1:0] r;

  for (genvar c = 0; c < 3; c++) begin : g_copy
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) r[c] <= RST;
      else        r[c] <= d_i;
    end
    // voter c
    assign q3_o[c] = (r[0] & r[1]) | (r[0] & r[2]) | (r[1] & r[2]);
  end

  assign q_o   = q3_o[0];
  assign err_o = (r[0] != r[1]) || (r[1] != r[2]);
endmodule
