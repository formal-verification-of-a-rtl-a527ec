// comp_unit: complete word comparison unit.
//
// Compares two unsigned words a and b and raises exactly one of gt, lt, eq.
// It is built the way the comparator is defined recursively: every bit pair
// goes through a one-bit comparator (two inverters and three NOR gates giving
// greater / less / equal for that bit), and a combining stage merges the
// result of the bits below with the next more significant bit:
//   g = g_hi | (e_hi & g_lo),  l = l_hi | (e_hi & l_lo),  e = e_hi & e_lo.
// The chain therefore ripples from bit 0 up to bit WIDTH-1. Purely
// combinational, no clock. WIDTH (the bitVector length, msb index + 1) is
// free; the default of 32 is this design's choice.
module comp_unit #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             gt,
  output logic             lt,
  output logic             eq
);

  // Per-bit greater / less / equal from the one-bit comparator.
  logic [WIDTH-1:0] bg, bl, be;
  // Accumulated result over bits [i:0].
  logic [WIDTH-1:0] cg, cl, ce;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // bitComp: g = NOR(~a, b), l = NOR(~b, a), e = NOR(g, l)
    assign bg[i] = ~((~a[i]) | b[i]);
    assign bl[i] = ~((~b[i]) | a[i]);
    assign be[i] = ~(bg[i] | bl[i]);
    if (i == 0) begin : g_base
      assign cg[0] = bg[0];
      assign cl[0] = bl[0];
      assign ce[0] = be[0];
    end else begin : g_comb
      // compComb: the new, more significant bit decides unless it is equal.
      assign cg[i] = bg[i] | (be[i] & cg[i-1]);
      assign cl[i] = bl[i] | (be[i] & cl[i-1]);
      assign ce[i] = be[i] & ce[i-1];
    end
  end

  assign gt = cg[WIDTH-1];
  assign lt = cl[WIDTH-1];
  assign eq = ce[WIDTH-1];

endmodule
