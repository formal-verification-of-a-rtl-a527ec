// pgck_tlm: page check translation look-aside module (simplest MMU).
//
// Holds one page descriptor in a register. Each cycle the command line wc
// chooses between two operations on the page descriptor addr:
//   wc = 1  store addr in the register and acknowledge;
//   wc = 0  compare addr with the stored value and acknowledge on a match.
// The unit is a word register, a complete comparison unit (only its equal
// output is used) and an OR gate of that result with wc. The register's clear
// input is tied low, as in the original unit. Timing: the result of the
// inputs of cycle t is on ack in cycle t+1 (ack is registered), and a stored
// value is used by the comparison from cycle t+1 on. WIDTH is the length of
// the page descriptor; its default of 32 is this design's choice.
module pgck_tlm #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] addr,  // page descriptor from the bus
  input  logic             wc,    // 1: write register, 0: compare
  output logic [WIDTH-1:0] reg_q, // stored page descriptor
  output logic             ack
);

  logic g, l, e;

  word_reg #(.WIDTH(WIDTH)) u_reg (
    .clk, .rst_n, .i(addr), .ld(wc), .clr(1'b0), .q(reg_q)
  );

  comp_unit #(.WIDTH(WIDTH)) u_comp (
    .a(reg_q), .b(addr), .gt(g), .lt(l), .eq(e)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= 1'b0;
    else        ack <= e | wc;
  end

endmodule
