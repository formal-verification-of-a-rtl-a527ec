// mmu_pkg: types and constants shared by the MMU family.
//
// The request type of the segment-table MMU is a triple of read / write /
// execute flags, held here as a packed struct in the order read, write,
// execute (read is the most significant bit). The control unit of that MMU
// steps through six numbered phases and steers its adder input multiplexers
// with a three-way select; both are enums here. The descriptor bit positions
// (avail, read, write, execute at the top of word 0) follow the segment
// descriptor layout; putting them in the four most significant bits is this
// design's reading of the layout, which shows them left-most.
package mmu_pkg;

  // Read / write / execute request type.
  typedef struct packed {
    logic r;
    logic w;
    logic e;
  } rwe_t;

  // Control-unit phase of the segment-table MMU.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,  // wait for a request; descriptor address is formed
    PH_MODE  = 3'd1,  // supervisor / user decision
    PH_DESC0 = 3'd2,  // wait for descriptor word 0 (size and rights)
    PH_DESC1 = 3'd3,  // wait for descriptor word 1 (real base)
    PH_XLAT  = 3'd4,  // translated address is ready: done + ack
    PH_TPW   = 3'd5   // table pointer written: done + ack
  } phase_e;

  // Select of the two adder-input multiplexers (muxC).
  typedef enum logic [1:0] {
    MUXC_ID_TBL   = 2'd0,  // shifted segment id + table pointer
    MUXC_OFS_DATA = 2'd1,  // segment offset + fetched word
    MUXC_ONE_LAT  = 2'd2   // one + latched adder output
  } muxc_e;

  // Bit positions in word 0 of a segment descriptor, counted from the top.
  localparam int unsigned DESC_AVAIL_FROM_TOP = 0;
  localparam int unsigned DESC_READ_FROM_TOP  = 1;
  localparam int unsigned DESC_WRITE_FROM_TOP = 2;
  localparam int unsigned DESC_EXEC_FROM_TOP  = 3;

endpackage
