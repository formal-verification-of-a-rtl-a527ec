// seg_sec_unit: security compare unit of the segment-table MMU.
//
// Checks a request against word 0 of its segment descriptor:
//   valid access: the segment is available (in memory) and every right the
//                 request asks for (read, write, execute) is granted;
//   offset check: the segment offset of the virtual address is not greater
//                 than the segment size field of the descriptor.
// ok is registered: it reflects the inputs of the previous cycle. What the
// two checks compute is the original design's; the exact rule (a request bit
// requires its permission bit, plus the avail bit), the descriptor bit
// positions (avail, read, write, execute in the four top bits) and "size" as
// the largest legal offset are this design's reading of the descriptor.
module seg_sec_unit
  import mmu_pkg::*;
#(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned SEG_OFS_W = 16  // bits of segment offset / size
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] vaddr,
  input  logic [WIDTH-1:0] desc0,   // descriptor word 0
  input  rwe_t             rwe,
  output logic             ok
);

  logic avail, rd, wr, ex;
  logic valid_access, ofs_leq;

  assign avail = desc0[WIDTH-1-DESC_AVAIL_FROM_TOP];
  assign rd    = desc0[WIDTH-1-DESC_READ_FROM_TOP];
  assign wr    = desc0[WIDTH-1-DESC_WRITE_FROM_TOP];
  assign ex    = desc0[WIDTH-1-DESC_EXEC_FROM_TOP];

  assign valid_access = avail & (~rwe.r | rd) & (~rwe.w | wr) & (~rwe.e | ex);
  assign ofs_leq      = vaddr[SEG_OFS_W-1:0] <= desc0[SEG_OFS_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ok <= 1'b0;
    else        ok <= valid_access & ofs_leq;
  end

endmodule
