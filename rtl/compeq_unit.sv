// compeq_unit: word equality comparison unit.
//
// Raises eq when the words a and b are bit-for-bit equal. Each bit pair goes
// through a one-bit equality cell (NOR of the two bits OR-ed with their AND,
// i.e. "both 0 or both 1"), and the cells are AND-ed in a chain from bit 0
// upward. It needs far fewer gates than comp_unit and is what a device uses
// to recognise its own bus address. Combinational, no clock. The default
// WIDTH of 32 is this design's choice.
module compeq_unit #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);

  logic [WIDTH-1:0] be;  // bit i equal
  logic [WIDTH-1:0] ce;  // bits [i:0] equal

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign be[i] = (~(a[i] | b[i])) | (a[i] & b[i]);
    if (i == 0) begin : g_base
      assign ce[0] = be[0];
    end else begin : g_chain
      assign ce[i] = ce[i-1] & be[i];
    end
  end

  assign eq = ce[WIDTH-1];

endmodule
