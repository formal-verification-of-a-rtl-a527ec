// seg_table_full_tb: the segment-table MMU at its default sizes (32-bit
// addresses, 16-bit segment offsets) working against a table that has a
// descriptor for every one of the 2^16 segment ids, inside a real memory of
// 2^24 words (16 M words).
//
// The memory is not stored: its read port returns, one cycle after a read
// request, a word computed from the address. Inside the table region the
// word is the descriptor of entry k = (addr - TP) / 2, given by a formula:
//   h     = k * 32'h9E37_79B1 (a multiplicative hash)
//   word0 = {avail = (h[31:29] != 0), rights = h[28:26], 12'h0, size = {8'h00, h[7:0]}}
//   word1 = base = k << 8
// so every granted real address, base + offset with offset <= size <= 255,
// lies below 2^24. Elsewhere the memory returns zero, and any fetch outside
// the table counts as a failure.
//
// The test loads the table pointer with a supervisor write, then issues one
// user request for every segment id in turn, with a random right and a
// random offset (mostly within the size). It checks ack, rAddr, the fetch
// addresses, the latency (7 edges granted, 6 refused), that rAddr stays in
// the 16 M-word memory, and that granted, unavailable, rights-refused and
// size-refused requests all occurred.
module seg_table_full_tb;
  import mmu_pkg::*;
  localparam int unsigned NID = 1 << 16;             // segment ids at the defaults
  localparam int unsigned MEM_WORDS = 1 << 24;       // 16 M words of real memory
  localparam logic [31:0] TPA = 32'hFFFF_0000;       // table pointer bus address
  localparam logic [31:0] TP  = 32'h00E0_0000;       // table location, inside the memory
  int checks = 0, failures = 0;
  int n_grant = 0, n_avail = 0, n_right = 0, n_size = 0, n_fetch = 0;

  logic        clk = 0, rst_n = 0;
  logic        req_in, sup, xlat, done, ack, mem_rd;
  rwe_t        rwe;
  logic [31:0] vaddr, vdata, raddr, tbl_ptr, mem_addr, mem_rdata;
  phase_e      phase;

  seg_mmu dut (.clk, .rst_n, .req_in, .sup, .rwe, .vaddr, .vdata, .tbl_ptr_addr(TPA),
               .raddr, .xlat, .done, .ack, .tbl_ptr, .phase,
               .mem_rd, .mem_addr, .mem_rdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] desc0(input int unsigned k);
    logic [31:0] h;
    h = 32'(k) * 32'h9E37_79B1;
    return {h[31:29] != 3'b000, h[28:26], 12'h000, 8'h00, h[7:0]};
  endfunction

  function automatic logic [31:0] desc1(input int unsigned k);
    return 32'(k) << 8;
  endfunction

  // Computed memory: one-cycle read latency.
  always_ff @(posedge clk) begin
    if (mem_rd) begin
      if (mem_addr >= TP && mem_addr < TP + 2 * NID) begin
        mem_rdata <= mem_addr[0] ? desc1((mem_addr - TP) >> 1) : desc0((mem_addr - TP) >> 1);
        n_fetch++;
      end else begin
        mem_rdata <= '0;
        if (rst_n) begin
          failures++;
          $display("FAIL fetch outside the table at %h", mem_addr);
        end
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    if (e_ack && !s) begin
      checks++;
      if (raddr >= MEM_WORDS) begin
        failures++;
        $display("FAIL real address %h beyond the memory", raddr);
      end
    end
  endtask

  initial begin
    req_in = 0; sup = 0; rwe = '0; vaddr = '0; vdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1'b1, 3'b010, TPA, TP, 1'b1, TPA, 3);
    checks++;
    if (tbl_ptr !== TP) begin failures++; $display("FAIL table pointer %h", tbl_ptr); end
    for (int unsigned k = 0; k < NID; k++) begin
      logic [31:0] d0, va;
      logic [15:0] ofs;
      rwe_t        q;
      logic        av, rt, sz;
      d0  = desc0(k);
      ofs = (($urandom % 4) == 0) ? 16'($urandom) : 16'($urandom_range(0, 32'(d0[15:0])));
      va  = {16'(k), ofs};
      q   = rwe_t'(3'b001 << ($urandom % 3));
      av  = d0[31];
      rt  = (!q.r || d0[30]) && (!q.w || d0[29]) && (!q.e || d0[28]);
      sz  = ofs <= d0[15:0];
      if (av && rt && sz) begin
        run(1'b0, q, va, $urandom, 1'b1, desc1(k) + 32'(ofs), 7);
        n_grant++;
      end else begin
        run(1'b0, q, va, $urandom, 1'b0, va, 6);
        if (!av) n_avail++; else if (!rt) n_right++; else n_size++;
      end
    end
    checks++;
    if (n_fetch != 2 * NID) begin
      failures++;
      $display("FAIL %0d table fetches, expected %0d", n_fetch, 2 * NID);
    end
    checks++;
    if (n_grant == 0 || n_avail == 0 || n_right == 0 || n_size == 0) begin
      failures++;
      $display("FAIL coverage grant=%0d avail=%0d right=%0d size=%0d", n_grant, n_avail, n_right, n_size);
    end
    $display("ids=%0d granted=%0d unavailable=%0d rights=%0d size=%0d fetches=%0d",
             NID, n_grant, n_avail, n_right, n_size, n_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
