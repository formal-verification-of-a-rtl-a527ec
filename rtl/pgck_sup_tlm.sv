// pgck_sup_tlm: page check TLM with a supervisor line.
//
// Same as the page check TLM, except that a write of the register only
// happens when the supervisor line sup is high: the write command is
// x = wc & sup. With x = 1 the register takes addr and ack is raised; with
// x = 0 ack reports whether addr equals the stored value. A user-mode write
// attempt (wc = 1, sup = 0) therefore leaves the register alone and is
// answered like a compare. Timing as in pgck_tlm: ack in cycle t+1 for the
// inputs of cycle t. The ack gate takes x, not sup, as in the unit's formal
// definition; so a supervisor compare is not acknowledged unless it matches.
module pgck_sup_tlm #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] addr,
  input  logic             wc,    // 1: write request, 0: compare
  input  logic             sup,   // supervisor line
  output logic [WIDTH-1:0] reg_q,
  output logic             ack
);

  logic x;
  logic g, l, e;

  assign x = wc & sup;

  word_reg #(.WIDTH(WIDTH)) u_reg (
    .clk, .rst_n, .i(addr), .ld(x), .clr(1'b0), .q(reg_q)
  );

  comp_unit #(.WIDTH(WIDTH)) u_comp (
    .a(reg_q), .b(addr), .gt(g), .lt(l), .eq(e)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= 1'b0;
    else        ack <= e | x;
  end

endmodule
