// bb_mmu: base and bounds MMU.
//
// A memory-mapped protection register (the base-and-bounds register) sits
// at the bus address REG_ADDR. The address bus is split into a segment field,
// bits [WIDTH-1:OFS_MSB], and an offset field, bits [OFS_MSB:0] (the two
// fields share bit OFS_MSB, exactly as the original comparisons do; since the
// segment fields must be equal, this does not change the outcome).
//   Supervisor mode (sup = 1): every request is acknowledged. If rw = 1 and
//     addr equals REG_ADDR, the register takes the data bus.
//   User mode (sup = 0): the request is acknowledged when the address segment
//     equals the register's segment (the base) and the address offset is not
//     greater than the register's offset (the bounds).
// Built from a register, a full comparator for the register address, a full
// comparator over the segment fields, a full comparator over the offset
// fields (its "greater" output inverted), and AND / OR gates. Timing: ack in
// cycle t+1 for the inputs of cycle t; a register write is visible from
// cycle t+1. WIDTH, OFS_MSB and REG_ADDR are free in the original; their
// defaults are this design's choice. OFS_MSB must be below WIDTH-1.
module bb_mmu #(
  parameter int unsigned     WIDTH    = 32,
  parameter int unsigned     OFS_MSB  = 15,
  parameter logic [WIDTH-1:0] REG_ADDR = 32'hFFFF_FFF0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] addr,
  input  logic [WIDTH-1:0] data,
  input  logic             sup,    // supervisor line
  input  logic             rw,     // 1: write
  output logic [WIDTH-1:0] bb_q,   // base-and-bounds register
  output logic             ack
);

  localparam int unsigned SEG_W = WIDTH - OFS_MSB;
  localparam int unsigned OFS_W = OFS_MSB + 1;

  logic g0, l0, addr_match;
  logic g1, l1, good_seg;
  logic g2, l2, e2;
  logic write_bb, good_ofs, ok;

  // Is the protection register being addressed?
  comp_unit #(.WIDTH(WIDTH)) u_addr_cmp (
    .a(addr), .b(REG_ADDR), .gt(g0), .lt(l0), .eq(addr_match)
  );
  assign write_bb = addr_match & (rw & sup);

  word_reg #(.WIDTH(WIDTH)) u_reg (
    .clk, .rst_n, .i(data), .ld(write_bb), .clr(1'b0), .q(bb_q)
  );

  // Segment check: stored base against the address segment.
  comp_unit #(.WIDTH(SEG_W)) u_seg_cmp (
    .a(bb_q[WIDTH-1:OFS_MSB]), .b(addr[WIDTH-1:OFS_MSB]),
    .gt(g1), .lt(l1), .eq(good_seg)
  );

  // Bounds check: address offset must not exceed the stored bounds.
  comp_unit #(.WIDTH(OFS_W)) u_ofs_cmp (
    .a(addr[OFS_MSB:0]), .b(bb_q[OFS_MSB:0]), .gt(g2), .lt(l2), .eq(e2)
  );

  assign good_ofs = ~g2;
  assign ok       = good_ofs & good_seg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= 1'b0;
    else        ack <= ok | sup;
  end

endmodule
