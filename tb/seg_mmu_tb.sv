// seg_mmu_tb: the segment-table MMU with a RAM model holding a segment
// table. A table of 16 random descriptors (random avail bit, rights, size
// and real base) is written to memory; then, in order:
//   - a supervisor write to the table pointer address loads the pointer;
//   - random supervisor requests pass through untranslated;
//   - random user requests are translated or refused.
// Each result is compared with the expected one worked out from the test's
// own copy of the table: ack, rAddr (offset + base, or the virtual address),
// the table pointer, and the number of clock edges from the edge that takes
// req_in to the edge after which done is high (2 for a pass-through, 3 for a
// table pointer write, 7 for a granted and 6 for a refused user request,
// with a one-cycle memory). done must be a single-cycle pulse.
module seg_mmu_tb;
  import mmu_pkg::*;
  localparam logic [31:0] TPA = 32'hFFFF_0000;  // table pointer bus address
  localparam logic [31:0] TP  = 32'h0000_0100;  // table location
  localparam int NSEG = 16;
  int checks = 0, failures = 0;
  int n_tpw = 0, n_pass = 0, n_grant = 0, n_avail = 0, n_right = 0, n_size = 0;

  logic        clk = 0, rst_n = 0;
  logic        req_in, sup, xlat, done, ack, mem_rd, we;
  rwe_t        rwe;
  logic [31:0] vaddr, vdata, raddr, tbl_ptr, mem_addr, mem_rdata, waddr, wdata;
  phase_e      phase;
  logic [31:0] d0 [NSEG];
  logic [31:0] d1 [NSEG];

  seg_mmu dut (.clk, .rst_n, .req_in, .sup, .rwe, .vaddr, .vdata, .tbl_ptr_addr(TPA),
               .raddr, .xlat, .done, .ack, .tbl_ptr, .phase,
               .mem_rd, .mem_addr, .mem_rdata);
  seg_ram_model #(.AW(10)) u_ram (.clk, .rd(mem_rd), .addr(mem_addr), .rdata(mem_rdata),
                                  .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue one request, wait for done, check the result and the latency.
  task automatic run(input logic s, input rwe_t q, input logic [31:0] va, input logic [31:0] vd,
                     input logic e_ack, input logic [31:0] e_raddr, input int e_lat);
    int lat;
    @(negedge clk);
    req_in = 1; sup = s; rwe = q; vaddr = va; vdata = vd;
    @(posedge clk);
    lat = 1;
    @(negedge clk);
    req_in = 0;
    do begin
      @(posedge clk); lat++; #1;
    end while (!done && lat < 50);
    checks++;
    if (ack !== e_ack || raddr !== e_raddr || lat != e_lat) begin
      failures++;
      $display("FAIL sup=%b rwe=%b va=%h: ack=%b/%b raddr=%h/%h latency=%0d/%0d",
               s, q, va, ack, e_ack, raddr, e_raddr, lat, e_lat);
    end
    @(posedge clk); #1;
    checks++;
    if (done !== 1'b0 || phase !== PH_IDLE) begin
      failures++;
      $display("FAIL done not a single pulse or phase %0d not idle", phase);
    end
  endtask

  initial begin
    req_in = 0; sup = 0; rwe = '0; vaddr = '0; vdata = '0; we = 0; waddr = '0; wdata = '0;
    for (int k = 0; k < NSEG; k++) begin
      d0[k] = {($urandom % 4) != 0, 3'($urandom), 12'h0, 16'($urandom % 4096)};
      d1[k] = 32'h0010_0000 + 32'($urandom % 4096) * 32'h100;
      @(negedge clk); we = 1; waddr = TP + 2 * k;     wdata = d0[k];
      @(negedge clk); we = 1; waddr = TP + 2 * k + 1; wdata = d1[k];
    end
    @(negedge clk); we = 0;
    rst_n = 1;
    // table pointer write
    run(1'b1, 3'b010, TPA, TP, 1'b1, TPA, 3);
    n_tpw++;
    checks++;
    if (tbl_ptr !== TP) begin failures++; $display("FAIL table pointer %h", tbl_ptr); end
    // supervisor pass-through
    for (int k = 0; k < 20; k++) begin
      logic [31:0] va;
      va = $urandom;
      run(1'b1, rwe_t'(3'b001 << ($urandom % 3)), va, $urandom, 1'b1, va, 2);
      n_pass++;
    end
    // user requests
    for (int k = 0; k < 300; k++) begin
      logic [31:0] va;
      logic [15:0] ofs;
      int          sid;
      rwe_t        q;
      logic        av, rt, sz;
      sid = $urandom % NSEG;
      ofs = (($urandom % 3) == 0) ? 16'($urandom) : 16'($urandom_range(0, 32'(d0[sid][15:0])));
      va  = {16'(sid), ofs};
      q   = rwe_t'(3'b001 << ($urandom % 3));
      av  = d0[sid][31];
      rt  = (!q.r || d0[sid][30]) && (!q.w || d0[sid][29]) && (!q.e || d0[sid][28]);
      sz  = ofs <= d0[sid][15:0];
      if (av && rt && sz) begin
        run(1'b0, q, va, $urandom, 1'b1, d1[sid] + 32'(ofs), 7);
        n_grant++;
      end else begin
        run(1'b0, q, va, $urandom, 1'b0, va, 6);
        if (!av) n_avail++; else if (!rt) n_right++; else n_size++;
      end
    end
    checks++;
    if (n_grant == 0 || n_avail == 0 || n_right == 0 || n_size == 0) begin
      failures++;
      $display("FAIL coverage grant=%0d avail=%0d right=%0d size=%0d", n_grant, n_avail, n_right, n_size);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
