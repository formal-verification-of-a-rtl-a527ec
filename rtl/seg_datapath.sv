// seg_datapath: data path of the segment-table MMU.
//
// Everything of the segment-table MMU except its control unit:
//   split      segment id (vaddr bits above SEG_OFS_W) shifted left by one,
//              which is the descriptor's offset in the two-word-per-entry
//              table, and the segment offset (low SEG_OFS_W bits);
//   mux1/mux2  adder inputs, selected by mux_c:
//                0: shifted id   + table pointer   (descriptor address)
//                1: offset       + fetched word    (real address)
//                2: one          + latched sum     (second descriptor word)
//   adder      registered: its sum of cycle t is out in cycle t+1;
//   latch L    passes the adder output, or holds its last value while l_c;
//   tblPtr     segment table pointer register, loaded from the data bus by
//              tbl_c;
//   tmp        descriptor register, loaded with the fetched word by tmp_c;
//   security   seg_sec_unit on vaddr, tmp and the request type (registered);
//   match      registered equality of vaddr and the table pointer address;
//   rAddr mux  the latch while xlat, else the virtual address of the
//              previous cycle;
//   memory     seg_mem_unit, fetching at rAddr on r_req.
// All of this, with its one-cycle delays, is the original design's. Word and
// address are the same width here; the adder wraps around (its carry out is
// dropped). The latch is built as a register plus a multiplexer, so the
// design stays edge-triggered. WIDTH and SEG_OFS_W defaults are this
// design's choice.
module seg_datapath
  import mmu_pkg::*;
#(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned SEG_OFS_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // system bus
  input  logic [WIDTH-1:0] vaddr,
  input  logic [WIDTH-1:0] vdata,
  input  rwe_t             rwe,
  input  logic [WIDTH-1:0] tbl_ptr_addr,  // bus address of the table pointer
  // from the control unit
  input  muxc_e            mux_c,
  input  logic             tmp_c,
  input  logic             tbl_c,
  input  logic             l_c,
  input  logic             r_req,
  input  logic             xlat,
  // to the control unit
  output logic             match,
  output logic             sec_ok,
  output logic             fdone,
  // results
  output logic [WIDTH-1:0] raddr,
  output logic [WIDTH-1:0] tbl_ptr,
  // memory port
  output logic             mem_rd,
  output logic [WIDTH-1:0] mem_addr,
  input  logic [WIDTH-1:0] mem_rdata
);


  logic [WIDTH-1:0] id_shf, seg_ofs;
  logic [WIDTH-1:0] mux1, mux2, add_out, lat_out, lat_hold;
  logic [WIDTH-1:0] data, sec_data, vaddr_q;
  logic             addr_eq;

  // split
  assign id_shf  = WIDTH'({vaddr[WIDTH-1:SEG_OFS_W], 1'b0});
  assign seg_ofs = WIDTH'(vaddr[SEG_OFS_W-1:0]);

  // registers
  word_reg #(.WIDTH(WIDTH)) u_tbl_ptr (
    .clk, .rst_n, .i(vdata), .ld(tbl_c), .clr(1'b0), .q(tbl_ptr)
  );
  word_reg #(.WIDTH(WIDTH)) u_tmp (
    .clk, .rst_n, .i(data), .ld(tmp_c), .clr(1'b0), .q(sec_data)
  );

  // security compare unit
  seg_sec_unit #(.WIDTH(WIDTH), .SEG_OFS_W(SEG_OFS_W)) u_sec (
    .clk, .rst_n, .vaddr, .desc0(sec_data), .rwe, .ok(sec_ok)
  );

  // adder input multiplexers
  always_comb begin
    unique case (mux_c)
      MUXC_ID_TBL:   begin mux1 = id_shf;     mux2 = tbl_ptr; end
      MUXC_OFS_DATA: begin mux1 = seg_ofs;    mux2 = data;    end
      default:       begin mux1 = WIDTH'(1);  mux2 = lat_out; end
    endcase
  end

  // adder, latch, address match, previous virtual address
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      add_out  <= '0;
      lat_hold <= '0;
      match    <= 1'b0;
      vaddr_q  <= '0;
    end else begin
      add_out  <= mux1 + mux2;
      lat_hold <= lat_out;
      match    <= addr_eq;
      vaddr_q  <= vaddr;
    end
  end

  assign lat_out = l_c ? lat_hold : add_out;

  compeq_unit #(.WIDTH(WIDTH)) u_match (
    .a(vaddr), .b(tbl_ptr_addr), .eq(addr_eq)
  );

  // real address multiplexer
  assign raddr = xlat ? lat_out : vaddr_q;

  // memory fetch unit
  seg_mem_unit #(.WIDTH(WIDTH)) u_mem (
    .clk, .rst_n, .req(r_req), .addr(raddr), .data, .done(fdone),
    .mem_rd, .mem_addr, .mem_rdata
  );

endmodule
