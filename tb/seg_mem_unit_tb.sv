// seg_mem_unit_tb: random fetch requests against the RAM model filled with
// address-derived words. A request in cycle t must give done and the stored
// word in cycle t+1; no request gives done = 0 and data = 0.
module seg_mem_unit_tb;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        req, done, mem_rd, we;
  logic [31:0] addr, data, mem_addr, mem_rdata, waddr, wdata;
  logic [31:0] last_addr;
  logic        last_req;

  seg_mem_unit dut (.clk, .rst_n, .req, .addr, .data, .done, .mem_rd, .mem_addr, .mem_rdata);
  seg_ram_model #(.AW(6)) u_ram (.clk, .rd(mem_rd), .addr(mem_addr), .rdata(mem_rdata),
                                 .we, .waddr, .wdata);

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5A5A_0000;
  endfunction

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; addr = '0; we = 0; waddr = '0; wdata = '0;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk); we = 1; waddr = k; wdata = word_at(k);
    end
    @(negedge clk); we = 0;
    rst_n = 1;
    last_req = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      req  = ($urandom % 2) == 0;
      addr = 32'($urandom % 64);
      last_req  = req;
      last_addr = addr;
      @(posedge clk); #1;
      checks++;
      if (done !== last_req || data !== (last_req ? word_at(last_addr) : 32'h0)) begin
        failures++;
        $display("FAIL cycle %0d: done=%b data=%h (req=%b addr=%h)", k, done, data, last_req, last_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
