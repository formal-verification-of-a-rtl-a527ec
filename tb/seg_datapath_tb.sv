// seg_datapath_tb: the segment-table MMU data path under random control
// inputs, against a cycle-by-cycle reference model of its units (split,
// adder multiplexers, registered adder, hold latch, table pointer and
// descriptor registers, security unit, address match, rAddr multiplexer and
// one-cycle memory fetch). A small RAM model holds address-derived words.
// Compared every cycle: rAddr, table pointer, match, secOK, fdone and the
// memory request.
module seg_datapath_tb;
  import mmu_pkg::*;
  localparam int AW = 6;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] vaddr, vdata, tpa, raddr, tbl_ptr, mem_addr, mem_rdata;
  rwe_t        rwe;
  muxc_e       mux_c;
  logic        tmp_c, tbl_c, l_c, r_req, xlat, match, sec_ok, fdone, mem_rd;
  logic        we;
  logic [31:0] waddr, wdata;

  // reference state
  logic [31:0] r_tbl, r_tmp, r_add, r_lath, r_vq, r_last;
  logic        r_match, r_done, r_sec;
  // reference combinational values
  logic [31:0] c_lat, c_raddr, c_data, c_m1, c_m2;

  seg_datapath dut (.clk, .rst_n, .vaddr, .vdata, .rwe, .tbl_ptr_addr(tpa),
                    .mux_c, .tmp_c, .tbl_c, .l_c, .r_req, .xlat,
                    .match, .sec_ok, .fdone, .raddr, .tbl_ptr,
                    .mem_rd, .mem_addr, .mem_rdata);
  seg_ram_model #(.AW(AW)) u_ram (.clk, .rd(mem_rd), .addr(mem_addr), .rdata(mem_rdata),
                                  .we, .waddr, .wdata);

  function automatic logic [31:0] word_at(input logic [31:0] a);
    logic [31:0] w;
    w = {a[AW-1:0] * 7'd37, 9'h0, a[AW-1:0] * 7'd11, 10'h3} ^ 32'hC000_0000;
    return w;
  endfunction

  function automatic logic sec_ref(input logic [31:0] va, input logic [31:0] d, input rwe_t q);
    return d[31] && (!q.r || d[30]) && (!q.w || d[29]) && (!q.e || d[28]) && (va[15:0] <= d[15:0]);
  endfunction

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vaddr = '0; vdata = '0; tpa = 32'h0000_1230; rwe = '0; mux_c = MUXC_ID_TBL;
    tmp_c = 0; tbl_c = 0; l_c = 0; r_req = 0; xlat = 0; we = 0; waddr = '0; wdata = '0;
    for (int k = 0; k < 2**AW; k++) begin
      @(negedge clk); we = 1; waddr = k; wdata = word_at(k);
    end
    @(negedge clk); we = 0;
    rst_n = 1;
    r_tbl = '0; r_tmp = '0; r_add = '0; r_lath = '0; r_vq = '0; r_last = '0;
    r_match = 0; r_done = 0; r_sec = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      vaddr = {16'($urandom % 8), 16'($urandom % 4096)};
      if ($urandom % 4 == 0) vaddr = tpa;
      vdata = 32'($urandom % 32);
      rwe   = rwe_t'(3'b001 << ($urandom % 3));
      mux_c = muxc_e'($urandom % 3);
      tmp_c = $urandom % 2; tbl_c = ($urandom % 4) == 0; l_c = $urandom % 2;
      r_req = $urandom % 2; xlat = $urandom % 2;
      // reference combinational part
      c_lat   = l_c ? r_lath : r_add;
      c_raddr = xlat ? c_lat : r_vq;
      c_data  = r_done ? word_at(r_last) : 32'h0;
      case (mux_c)
        MUXC_ID_TBL:   begin c_m1 = {15'h0, vaddr[31:16], 1'b0}; c_m2 = r_tbl;  end
        MUXC_OFS_DATA: begin c_m1 = {16'h0, vaddr[15:0]};        c_m2 = c_data; end
        default:       begin c_m1 = 32'd1;                       c_m2 = c_lat;  end
      endcase
      #1;
      checks++;
      if (raddr !== c_raddr || tbl_ptr !== r_tbl || match !== r_match || sec_ok !== r_sec ||
          fdone !== r_done || mem_rd !== r_req || mem_addr !== c_raddr) begin
        failures++;
        $display("FAIL cycle %0d: raddr=%h/%h tbl=%h/%h match=%b/%b sec=%b/%b done=%b/%b",
                 k, raddr, c_raddr, tbl_ptr, r_tbl, match, r_match, sec_ok, r_sec, fdone, r_done);
      end
      @(posedge clk);
      r_sec   = sec_ref(vaddr, r_tmp, rwe);
      r_add   = c_m1 + c_m2;
      r_lath  = c_lat;
      r_match = (vaddr == tpa);
      r_vq    = vaddr;
      if (tbl_c) r_tbl = vdata;
      if (tmp_c) r_tmp = c_data;
      r_done  = r_req;
      r_last  = c_raddr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
