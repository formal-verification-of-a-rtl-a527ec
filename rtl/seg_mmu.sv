// seg_mmu: virtual address translation MMU with a memory-resident segment
// table.
//
// A virtual address is a segment id (bits above SEG_OFS_W) and a segment
// offset. The segment table lives in main memory at the address held in the
// table pointer register; entry k is two words at tblPtr + 2k:
//   word 0: avail, read, write, execute bits at the top, segment size
//           (largest legal offset) in the low SEG_OFS_W bits;
//   word 1: real base address of the segment.
// User mode: for each request the MMU fetches both descriptor words, checks
// availability, rights and bounds, and on success returns
// rAddr = offset + real base with ack. On failure it ends with done but no
// ack. Supervisor mode: no check and no translation; a write to the table
// pointer address (tbl_ptr_addr) loads the table pointer from the data bus.
// The control unit (seg_ctrl) sequences the data path (seg_datapath).
// Handshake: raise req_in in a cycle where phase is 0 and hold the request
// (vaddr, vdata, rwe, sup, tbl_ptr_addr) steady until done, which is high
// for exactly one cycle; ack and rAddr are valid while done is high. With a
// one-cycle memory, a user request takes 7 cycles from req_in to done, a
// supervisor pass-through 2, a table pointer write 3, a refused user
// request 6.
module seg_mmu
  import mmu_pkg::*;
#(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned SEG_OFS_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_in,
  input  logic             sup,
  input  rwe_t             rwe,
  input  logic [WIDTH-1:0] vaddr,
  input  logic [WIDTH-1:0] vdata,
  input  logic [WIDTH-1:0] tbl_ptr_addr,
  output logic [WIDTH-1:0] raddr,
  output logic             xlat,
  output logic             done,
  output logic             ack,
  output logic [WIDTH-1:0] tbl_ptr,
  output phase_e           phase,
  // descriptor fetch port to main memory
  output logic             mem_rd,
  output logic [WIDTH-1:0] mem_addr,
  input  logic [WIDTH-1:0] mem_rdata
);

  muxc_e mux_c;
  logic  tmp_c, tbl_c, l_c, r_req;
  logic  match, sec_ok, fdone;

  seg_ctrl u_ctrl (
    .clk, .rst_n, .req_in, .sup, .rwe, .match, .sec_ok, .fdone,
    .mux_c, .tmp_c, .tbl_c, .l_c, .r_req, .xlat, .done, .ack, .phase
  );

  seg_datapath #(.WIDTH(WIDTH), .SEG_OFS_W(SEG_OFS_W)) u_dp (
    .clk, .rst_n, .vaddr, .vdata, .rwe, .tbl_ptr_addr,
    .mux_c, .tmp_c, .tbl_c, .l_c, .r_req, .xlat,
    .match, .sec_ok, .fdone, .raddr, .tbl_ptr,
    .mem_rd, .mem_addr, .mem_rdata
  );

  // Without a request, an idle MMU stays idle, gives no ack and keeps its
  // table pointer.
  a_idle_no_req: assert property (@(posedge clk) disable iff (!rst_n)
    phase == PH_IDLE && !req_in |=> phase == PH_IDLE && !ack && $stable(tbl_ptr));

endmodule
