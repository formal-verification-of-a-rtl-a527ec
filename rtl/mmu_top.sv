// mmu_top: the family of memory management units, side by side.
//
// The five MMUs form a hierarchy, each adding a feature to the one before;
// they are independent devices, so here each keeps its own ports (prefixed)
// and they share only the clock and reset:
//   pc_   page check TLM                       (pgck_tlm)
//   pcs_  page check TLM with supervisor line  (pgck_sup_tlm)
//   bb_   base and bounds MMU                  (bb_mmu)
//   vbb_  base and bounds MMU with virtual address translation (vbb_mmu)
//   seg_  segment-table MMU (seg_mmu) with its memory-side request stage
//         (seg_bus_if). Main memory is outside: seg_mem_* is the MMU's
//         descriptor fetch port (a synchronous RAM answers one cycle after
//         seg_mem_rd) and seg_bus_* the CPU request it passes on.
// Timing of each part is described in its own module. WIDTH is shared by
// all; OFS_MSB is the top bit of the offset field of bb_ and vbb_, SEG_OFS_W
// the offset width of seg_. Defaults are this design's choices.
module mmu_top
  import mmu_pkg::*;
#(
  parameter int unsigned      WIDTH     = 32,
  parameter int unsigned      OFS_MSB   = 15,
  parameter int unsigned      SEG_OFS_W = 16,
  parameter logic [WIDTH-1:0] BB_ADDR   = 32'hFFFF_FFF0,
  parameter logic [WIDTH-1:0] VBB_ADDR  = 32'hFFFF_FFE0
) (
  input  logic             clk,
  input  logic             rst_n,
  // page check TLM
  input  logic [WIDTH-1:0] pc_addr,
  input  logic             pc_wc,
  output logic             pc_ack,
  // page check TLM with supervisor line
  input  logic [WIDTH-1:0] pcs_addr,
  input  logic             pcs_wc,
  input  logic             pcs_sup,
  output logic             pcs_ack,
  // base and bounds MMU
  input  logic [WIDTH-1:0] bb_addr,
  input  logic [WIDTH-1:0] bb_data,
  input  logic             bb_sup,
  input  logic             bb_rw,
  output logic             bb_ack,
  // virtual address translation MMU
  input  logic [WIDTH-1:0] vbb_addr,
  input  logic [WIDTH-1:0] vbb_data,
  input  logic             vbb_sup,
  input  logic             vbb_rw,
  output logic             vbb_ack,
  output logic [WIDTH-1:0] vbb_out_addr,
  // segment-table MMU, CPU side
  input  logic             seg_req,
  input  logic             seg_sup,
  input  rwe_t             seg_rwe,
  input  logic [WIDTH-1:0] seg_vaddr,
  input  logic [WIDTH-1:0] seg_vdata,
  input  logic [WIDTH-1:0] seg_tbl_ptr_addr,
  output logic             seg_done,
  output logic             seg_ack,
  output logic [WIDTH-1:0] seg_raddr,
  output phase_e           seg_phase,
  // segment-table MMU, descriptor fetch port
  output logic             seg_mem_rd,
  output logic [WIDTH-1:0] seg_mem_addr,
  input  logic [WIDTH-1:0] seg_mem_rdata,
  // segment-table MMU, request passed on to memory
  output logic             seg_bus_req,
  output logic [WIDTH-1:0] seg_bus_addr,
  output logic [WIDTH-1:0] seg_bus_data,
  output rwe_t             seg_bus_rwe
);

  logic [WIDTH-1:0] pc_reg, pcs_reg, bb_reg, vbb_bb, vbb_va, seg_tbl_ptr;
  logic             seg_xlat;

  pgck_tlm #(.WIDTH(WIDTH)) u_pc (
    .clk, .rst_n, .addr(pc_addr), .wc(pc_wc), .reg_q(pc_reg), .ack(pc_ack)
  );

  pgck_sup_tlm #(.WIDTH(WIDTH)) u_pcs (
    .clk, .rst_n, .addr(pcs_addr), .wc(pcs_wc), .sup(pcs_sup),
    .reg_q(pcs_reg), .ack(pcs_ack)
  );

  bb_mmu #(.WIDTH(WIDTH), .OFS_MSB(OFS_MSB), .REG_ADDR(BB_ADDR)) u_bb (
    .clk, .rst_n, .addr(bb_addr), .data(bb_data), .sup(bb_sup), .rw(bb_rw),
    .bb_q(bb_reg), .ack(bb_ack)
  );

  vbb_mmu #(.WIDTH(WIDTH), .OFS_MSB(OFS_MSB), .REG_ADDR(VBB_ADDR)) u_vbb (
    .clk, .rst_n, .addr(vbb_addr), .data(vbb_data), .sup(vbb_sup),
    .rw(vbb_rw), .bb_q(vbb_bb), .va_q(vbb_va), .ack(vbb_ack),
    .out_addr(vbb_out_addr)
  );

  seg_mmu #(.WIDTH(WIDTH), .SEG_OFS_W(SEG_OFS_W)) u_seg (
    .clk, .rst_n, .req_in(seg_req), .sup(seg_sup), .rwe(seg_rwe),
    .vaddr(seg_vaddr), .vdata(seg_vdata), .tbl_ptr_addr(seg_tbl_ptr_addr),
    .raddr(seg_raddr), .xlat(seg_xlat), .done(seg_done), .ack(seg_ack),
    .tbl_ptr(seg_tbl_ptr), .phase(seg_phase),
    .mem_rd(seg_mem_rd), .mem_addr(seg_mem_addr), .mem_rdata(seg_mem_rdata)
  );

  seg_bus_if #(.WIDTH(WIDTH)) u_seg_bus (
    .clk, .rst_n, .vaddr(seg_vaddr), .vdata(seg_vdata), .rwe(seg_rwe),
    .done(seg_done), .ack(seg_ack), .xlat(seg_xlat), .raddr(seg_raddr),
    .bus_req(seg_bus_req), .bus_addr(seg_bus_addr), .bus_data(seg_bus_data),
    .bus_rwe(seg_bus_rwe)
  );

endmodule
