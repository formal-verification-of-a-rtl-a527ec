// mmu_top_tb: end-to-end test of all five MMUs at their default sizes.
//
// Four threads run side by side, one per group of ports, each comparing the
// MMU's answers with values worked out here:
//   page check TLMs: writes, matching and mismatching compares, a user-mode
//     write that must be refused;
//   base and bounds: register write, in-bounds, out-of-bounds and
//     wrong-segment user requests, supervisor pass;
//   translation MMU: both register writes, translated and refused user
//     requests, supervisor pass;
//   segment-table MMU: a table in a RAM model, table pointer write,
//     supervisor pass, granted user requests (with descriptor fetch waits)
//     and requests refused for each of the three reasons, plus the request
//     passed on to memory after a grant (and not after a refusal).
// Every mechanism is counted; one that never happens counts as a failure.
module mmu_top_tb;
  import mmu_pkg::*;
  localparam logic [31:0] BBA = 32'hFFFF_FFF0, VBA = 32'hFFFF_FFE0;
  localparam logic [31:0] TPA = 32'hFFFF_0000, TP = 32'h0000_0200;
  localparam int NSEG = 8;

  typedef enum int {
    PC_WRITE, PC_HIT, PC_MISS, PCS_WRITE, PCS_USER_WRITE_REFUSED, PCS_HIT,
    BB_WRITE, BB_IN_BOUNDS, BB_OUT_OF_BOUNDS, BB_WRONG_SEGMENT, BB_SUP_PASS,
    VBB_WRITE_BB, VBB_WRITE_VA, VBB_TRANSLATE, VBB_REFUSE, VBB_SUP_PASS,
    SEG_TP_WRITE, SEG_SUP_PASS, SEG_TRANSLATE, SEG_FETCH_WAIT, SEG_REFUSE_AVAIL,
    SEG_REFUSE_RIGHTS, SEG_REFUSE_BOUNDS, SEG_FORWARD_XLAT, SEG_FORWARD_PASS,
    SEG_NOT_FORWARDED, N_EV
  } ev_e;

  int checks = 0, failures = 0;
  int ev [N_EV];

  logic        clk = 0, rst_n = 0;
  logic [31:0] pc_addr, pcs_addr, bb_addr, bb_data, vbb_addr, vbb_data, vbb_out_addr;
  logic        pc_wc, pc_ack, pcs_wc, pcs_sup, pcs_ack, bb_sup, bb_rw, bb_ack;
  logic        vbb_sup, vbb_rw, vbb_ack;
  logic        seg_req, seg_sup, seg_done, seg_ack, seg_mem_rd, seg_bus_req, we;
  rwe_t        seg_rwe, seg_bus_rwe;
  logic [31:0] seg_vaddr, seg_vdata, seg_raddr, seg_mem_addr, seg_mem_rdata;
  logic [31:0] seg_bus_addr, seg_bus_data, waddr, wdata;
  phase_e      seg_phase;
  logic [31:0] d0 [NSEG];
  logic [31:0] d1 [NSEG];

  mmu_top dut (
    .clk, .rst_n,
    .pc_addr, .pc_wc, .pc_ack,
    .pcs_addr, .pcs_wc, .pcs_sup, .pcs_ack,
    .bb_addr, .bb_data, .bb_sup, .bb_rw, .bb_ack,
    .vbb_addr, .vbb_data, .vbb_sup, .vbb_rw, .vbb_ack, .vbb_out_addr,
    .seg_req, .seg_sup, .seg_rwe, .seg_vaddr, .seg_vdata, .seg_tbl_ptr_addr(TPA),
    .seg_done, .seg_ack, .seg_raddr, .seg_phase,
    .seg_mem_rd, .seg_mem_addr, .seg_mem_rdata,
    .seg_bus_req, .seg_bus_addr, .seg_bus_data, .seg_bus_rwe
  );

  seg_ram_model #(.AW(10)) u_ram (.clk, .rd(seg_mem_rd), .addr(seg_mem_addr),
                                  .rdata(seg_mem_rdata), .we, .waddr, .wdata);

  always #5 clk = ~clk;

  // descriptor fetch waits: phase 2 or 3 without a completed fetch
  always @(posedge clk)
    if (rst_n && (seg_phase == PH_DESC0 || seg_phase == PH_DESC1) && !dut.u_seg.fdone)
      ev[SEG_FETCH_WAIT]++;

  function automatic void expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- page check
  task automatic pc_thread();
    logic [31:0] page;
    page = 32'h0000_0ABC;
    @(negedge clk); pc_wc = 1; pc_addr = page;
    @(posedge clk); #1; expect_eq("pc write ack", pc_ack, 1); ev[PC_WRITE]++;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk); pc_wc = 0; pc_addr = (k % 2 == 0) ? page : page ^ 32'(k);
      @(posedge clk); #1;
      expect_eq("pc compare ack", pc_ack, (k % 2 == 0));
      ev[(k % 2 == 0) ? PC_HIT : PC_MISS]++;
    end
    // supervisor TLM
    @(negedge clk); pcs_wc = 1; pcs_sup = 1; pcs_addr = page;
    @(posedge clk); #1; expect_eq("pcs sup write ack", pcs_ack, 1); ev[PCS_WRITE]++;
    @(negedge clk); pcs_wc = 1; pcs_sup = 0; pcs_addr = 32'h1234_5678;
    @(posedge clk); #1; expect_eq("pcs user write ack", pcs_ack, 0);
    @(negedge clk); pcs_wc = 0; pcs_sup = 0; pcs_addr = page;
    @(posedge clk); #1; expect_eq("pcs compare after refused write", pcs_ack, 1);
    ev[PCS_USER_WRITE_REFUSED]++; ev[PCS_HIT]++;
  endtask

  // ----------------------------------------------------------- base and bounds
  task automatic bb_thread();
    logic [31:0] r;
    r = 32'h0024_0400;  // segment 0x0024 >> 1 pattern, bounds 0x0400
    @(negedge clk); bb_sup = 1; bb_rw = 1; bb_addr = BBA; bb_data = r;
    @(posedge clk); #1; expect_eq("bb write ack", bb_ack, 1); ev[BB_WRITE]++;
    for (int k = 0; k < 30; k++) begin
      logic [31:0] a;
      logic        e;
      case (k % 3)
        0: a = {r[31:16], 16'($urandom_range(0, 32'h400))};
        1: a = {r[31:16], 16'($urandom_range(32'h401, 32'h7FFF))};
        default: a = {r[31:16] ^ 16'h0100, 16'($urandom_range(0, 32'h400))};
      endcase
      e = (k % 3 == 0);
      @(negedge clk); bb_sup = 0; bb_rw = 0; bb_addr = a;
      @(posedge clk); #1; expect_eq("bb user ack", bb_ack, e);
      ev[(k % 3 == 0) ? BB_IN_BOUNDS : (k % 3 == 1) ? BB_OUT_OF_BOUNDS : BB_WRONG_SEGMENT]++;
    end
    @(negedge clk); bb_sup = 1; bb_rw = 0; bb_addr = 32'h7777_7777;
    @(posedge clk); #1; expect_eq("bb sup ack", bb_ack, 1); ev[BB_SUP_PASS]++;
    // translation MMU
    @(negedge clk); vbb_sup = 1; vbb_rw = 1; vbb_addr = VBA | 1; vbb_data = 32'h0030_0FFF;
    @(posedge clk); #1; expect_eq("vbb bb write ack", vbb_ack, 1); ev[VBB_WRITE_BB]++;
    @(negedge clk); vbb_sup = 1; vbb_rw = 1; vbb_addr = VBA; vbb_data = 32'h8000_0000;
    @(posedge clk); #1; expect_eq("vbb va write ack", vbb_ack, 1); ev[VBB_WRITE_VA]++;
    for (int k = 0; k < 20; k++) begin
      logic [31:0] a;
      a = {16'h0030, (k % 2 == 0) ? 16'($urandom_range(0, 32'h0FFF)) : 16'($urandom_range(32'h1000, 32'h7FFF))};
      @(negedge clk); vbb_sup = 0; vbb_rw = 0; vbb_addr = a;
      @(posedge clk); #1;
      if (k % 2 == 0) begin
        expect_eq("vbb xlat ack", vbb_ack, 1);
        expect_eq("vbb xlat addr", vbb_out_addr, {16'h8000, a[15:0]});
        ev[VBB_TRANSLATE]++;
      end else begin
        expect_eq("vbb refuse ack", vbb_ack, 0);
        expect_eq("vbb refuse addr", vbb_out_addr, a);
        ev[VBB_REFUSE]++;
      end
    end
    @(negedge clk); vbb_sup = 1; vbb_rw = 0; vbb_addr = 32'h0030_0001;
    @(posedge clk); #1;
    expect_eq("vbb sup ack", vbb_ack, 1); expect_eq("vbb sup addr", vbb_out_addr, 32'h0030_0001);
    ev[VBB_SUP_PASS]++;
  endtask

  // --------------------------------------------------------- segment-table MMU
  task automatic seg_run(input logic s, input rwe_t q, input logic [31:0] va, input logic [31:0] vd,
                         input logic e_ack, input logic [31:0] e_raddr, input int e_lat);
    int lat;
    @(negedge clk);
    seg_req = 1; seg_sup = s; seg_rwe = q; seg_vaddr = va; seg_vdata = vd;
    @(posedge clk); lat = 1;
    @(negedge clk); seg_req = 0;
    do begin @(posedge clk); lat++; #1; end while (!seg_done && lat < 50);
    expect_eq("seg ack", seg_ack, e_ack);
    expect_eq("seg raddr", seg_raddr, e_raddr);
    expect_eq("seg latency", lat, e_lat);
    @(posedge clk); #1;
    expect_eq("seg forwarded", seg_bus_req, e_ack);
    if (e_ack) begin
      expect_eq("seg bus addr", seg_bus_addr, e_raddr);
      expect_eq("seg bus data", seg_bus_data, vd);
      if (!s) ev[SEG_FORWARD_XLAT]++; else ev[SEG_FORWARD_PASS]++;
    end else ev[SEG_NOT_FORWARDED]++;
  endtask

  task automatic seg_thread();
    seg_run(1'b1, 3'b010, TPA, TP, 1'b1, TPA, 3); ev[SEG_TP_WRITE]++;
    expect_eq("seg table pointer", dut.u_seg.tbl_ptr, TP);
    for (int k = 0; k < 5; k++) begin
      logic [31:0] va;
      va = $urandom;
      seg_run(1'b1, 3'b100, va, 32'(k), 1'b1, va, 2); ev[SEG_SUP_PASS]++;
    end
    for (int k = 0; k < 120; k++) begin
      int sid;
      logic [15:0] ofs;
      rwe_t q;
      logic av, rt, sz;
      logic [31:0] va;
      sid = $urandom % NSEG;
      ofs = (k % 4 == 0) ? 16'($urandom) : 16'($urandom_range(0, 32'(d0[sid][15:0])));
      q   = rwe_t'(3'b001 << ($urandom % 3));
      va  = {16'(sid), ofs};
      av  = d0[sid][31];
      rt  = (!q.r || d0[sid][30]) && (!q.w || d0[sid][29]) && (!q.e || d0[sid][28]);
      sz  = ofs <= d0[sid][15:0];
      if (av && rt && sz) begin
        seg_run(1'b0, q, va, $urandom, 1'b1, d1[sid] + 32'(ofs), 7); ev[SEG_TRANSLATE]++;
      end else begin
        seg_run(1'b0, q, va, $urandom, 1'b0, va, 6);
        ev[!av ? SEG_REFUSE_AVAIL : !rt ? SEG_REFUSE_RIGHTS : SEG_REFUSE_BOUNDS]++;
      end
    end
  endtask

  initial begin
    foreach (ev[k]) ev[k] = 0;
    pc_addr = '0; pc_wc = 0; pcs_addr = '0; pcs_wc = 0; pcs_sup = 0;
    bb_addr = '0; bb_data = '0; bb_sup = 0; bb_rw = 0;
    vbb_addr = '0; vbb_data = '0; vbb_sup = 0; vbb_rw = 0;
    seg_req = 0; seg_sup = 0; seg_rwe = '0; seg_vaddr = '0; seg_vdata = '0;
    we = 0; waddr = '0; wdata = '0;
    // segment table: descriptor k at TP + 2k
    for (int k = 0; k < NSEG; k++) begin
      d0[k] = {k != 3, (k == 5) ? 3'b100 : 3'b111, 12'h0, 16'(32'h100 * (k + 1) - 1)};
      d1[k] = 32'h0004_0000 * (k + 1);
      @(negedge clk); we = 1; waddr = TP + 2 * k;     wdata = d0[k];
      @(negedge clk); we = 1; waddr = TP + 2 * k + 1; wdata = d1[k];
    end
    @(negedge clk); we = 0;
    rst_n = 1;
    fork
      pc_thread();
      bb_thread();
      seg_thread();
    join
    for (int k = 0; k < N_EV; k++) begin
      checks++;
      if (ev[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", ev_e'(k));
      end
    end
    $display("mechanisms:");
    for (int k = 0; k < N_EV; k++) $display("  %-24s %0d", ev_e'(k), ev[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
