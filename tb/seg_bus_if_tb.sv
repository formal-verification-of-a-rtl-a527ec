// seg_bus_if_tb: random MMU results; the memory-side request must appear one
// cycle after done & ack, with rAddr when xlat and the CPU address otherwise,
// and must not appear for done without ack.
module seg_bus_if_tb;
  import mmu_pkg::*;
  int checks = 0, failures = 0;
  int n_xl = 0, n_pass = 0, n_refused = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] vaddr, vdata, raddr, bus_addr, bus_data;
  rwe_t        rwe, bus_rwe;
  logic        done, ack, xlat, bus_req;
  logic [31:0] e_addr, e_data;
  rwe_t        e_rwe;
  logic        e_req;

  seg_bus_if dut (.clk, .rst_n, .vaddr, .vdata, .rwe, .done, .ack, .xlat, .raddr,
                  .bus_req, .bus_addr, .bus_data, .bus_rwe);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vaddr = '0; vdata = '0; raddr = '0; rwe = '0; done = 0; ack = 0; xlat = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      vaddr = $urandom; vdata = $urandom; raddr = $urandom; rwe = rwe_t'($urandom);
      done = ($urandom % 2) == 0; ack = done && ($urandom % 3) != 0; xlat = $urandom % 2;
      e_req = done & ack;
      if (e_req) begin
        e_addr = xlat ? raddr : vaddr; e_data = vdata; e_rwe = rwe;
        if (xlat) n_xl++; else n_pass++;
      end else if (done) n_refused++;
      @(posedge clk); #1;
      checks++;
      if (bus_req !== e_req || (e_req && (bus_addr !== e_addr || bus_data !== e_data || bus_rwe !== e_rwe))) begin
        failures++;
        $display("FAIL cycle %0d: req=%b/%b addr=%h/%h", k, bus_req, e_req, bus_addr, e_addr);
      end
    end
    checks++;
    if (n_xl == 0 || n_pass == 0 || n_refused == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
