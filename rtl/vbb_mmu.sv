// vbb_mmu: base and bounds MMU with virtual address translation.
//
// Two memory-mapped registers share the even/odd address pair REG_ADDR:
// the protection (base-and-bounds) register at the odd address and the
// translate address register (real base) at the even address; bit 0 of the
// bus address picks between them and bits [WIDTH-1:1] must equal those of
// REG_ADDR (equality comparator).
//   Supervisor mode (sup = 1): every request is acknowledged and the address
//     goes out untranslated. If rw = 1 and the address hits the register
//     pair, the selected register takes the data bus.
//   User mode (sup = 0): the request is valid when the address segment, bits
//     [WIDTH-1:OFS_MSB], equals the protection register's segment and the
//     offset, bits [OFS_MSB:0], is not greater than its bounds. A valid
//     request is acknowledged and its address translated: bits above OFS_MSB
//     come from the translate register, bits [OFS_MSB:0] from the virtual
//     address. An invalid request is not acknowledged and its address goes
//     out unchanged.
// Timing: ack and out_addr in cycle t+1 for the inputs of cycle t (both are
// registered); register writes are visible from cycle t+1. The defaults of
// WIDTH, OFS_MSB and REG_ADDR are this design's choice; REG_ADDR must be
// even and OFS_MSB below WIDTH-1.
module vbb_mmu #(
  parameter int unsigned     WIDTH    = 32,
  parameter int unsigned     OFS_MSB  = 15,
  parameter logic [WIDTH-1:0] REG_ADDR = 32'hFFFF_FFF0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] addr,      // virtual address
  input  logic [WIDTH-1:0] data,
  input  logic             sup,       // supervisor line
  input  logic             rw,        // 1: write
  output logic [WIDTH-1:0] bb_q,      // protection register
  output logic [WIDTH-1:0] va_q,      // translate address register
  output logic             ack,
  output logic [WIDTH-1:0] out_addr   // real address
);

  localparam int unsigned SEG_W = WIDTH - OFS_MSB;
  localparam int unsigned OFS_W = OFS_MSB + 1;

  logic x, am0, am1, w_bb, w_va;
  logic good_seg, g, l, e, good_ofs, ok, nxlat;
  logic [WIDTH-1:0] sel, vtor;

  assign x = rw & sup;

  compeq_unit #(.WIDTH(WIDTH-1)) u_addr_eq (
    .a(addr[WIDTH-1:1]), .b(REG_ADDR[WIDTH-1:1]), .eq(am0)
  );
  assign am1  = am0 & x;
  assign w_bb = am1 & addr[0];
  assign w_va = am1 & ~addr[0];

  word_reg #(.WIDTH(WIDTH)) u_bb_reg (
    .clk, .rst_n, .i(data), .ld(w_bb), .clr(1'b0), .q(bb_q)
  );
  word_reg #(.WIDTH(WIDTH)) u_va_reg (
    .clk, .rst_n, .i(data), .ld(w_va), .clr(1'b0), .q(va_q)
  );

  compeq_unit #(.WIDTH(SEG_W)) u_seg_eq (
    .a(bb_q[WIDTH-1:OFS_MSB]), .b(addr[WIDTH-1:OFS_MSB]), .eq(good_seg)
  );
  comp_unit #(.WIDTH(OFS_W)) u_ofs_cmp (
    .a(addr[OFS_MSB:0]), .b(bb_q[OFS_MSB:0]), .gt(g), .lt(l), .eq(e)
  );

  assign good_ofs = ~g;
  assign ok       = good_ofs & good_seg;
  assign nxlat    = ~ok | sup;

  // Selector: no translation takes the virtual address itself.
  assign sel  = nxlat ? addr : va_q;
  // Replace the segment bits by the real base; keep the offset bits.
  assign vtor = {sel[WIDTH-1:OFS_MSB+1], addr[OFS_MSB:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack      <= 1'b0;
      out_addr <= '0;
    end else begin
      ack      <= ok | sup;
      out_addr <= vtor;
    end
  end

endmodule
