// word_reg: clocked word register with load and clear.
//
// At each rising clock edge the register takes zero if clr is high, else the
// input i if ld is high, else keeps its value; clear wins when both are high.
// It starts at zero, which here is an asynchronous active-low reset (the
// reset style is this design's choice). The output q is the register itself,
// so a value loaded in cycle t is visible in cycle t+1.
module word_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] i,
  input  logic             ld,
  input  logic             clr,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (ld)  q <= i;
  end

endmodule
