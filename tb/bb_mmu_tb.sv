// bb_mmu_tb: base and bounds MMU against a reference model of its rule.
// Supervisor: ack always; rw to REG_ADDR loads the register. User: ack when
// addr[31:15] == reg[31:15] and addr[15:0] <= reg[15:0]. Addresses are drawn
// around the stored segment so that in-bounds, out-of-bounds and wrong
// segment requests all occur; each case is counted.
module bb_mmu_tb;
  localparam logic [31:0] RA = 32'hFFFF_FFF0;
  int checks = 0, failures = 0;
  int n_wr = 0, n_in = 0, n_out = 0, n_seg = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] addr, data, bb_q, m_reg;
  logic        sup, rw, ack, m_ack;

  bb_mmu dut (.clk, .rst_n, .addr, .data, .sup, .rw, .bb_q, .ack);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; data = '0; sup = 0; rw = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_reg = '0;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      sup  = ($urandom % 3) == 0;
      rw   = ($urandom % 2) == 0;
      data = {$urandom_range(0, 3) == 0 ? 17'h1FFFF : 17'($urandom), 15'($urandom)};
      case ($urandom % 6)
        0: addr = RA;
        3: addr = m_reg;                                        // offset == bounds
        1: addr = {m_reg[31:15], 15'($urandom)};                 // same segment
        2: addr = {m_reg[31:16], 16'($urandom_range(0, 32'(m_reg[15:0])))};
        4: addr = {m_reg[31:16], 16'($urandom_range(0, 32'(m_reg[15:0])))};
        default: addr = $urandom;
      endcase
      @(posedge clk);
      if (sup) begin
        m_ack = 1'b1;
        if (rw && addr == RA) begin m_reg = data; n_wr++; end
      end else begin
        m_ack = (addr[31:15] == m_reg[31:15]) && (addr[15:0] <= m_reg[15:0]);
        if (m_ack) n_in++;
        else if (addr[31:15] == m_reg[31:15]) n_out++;
        else n_seg++;
      end
      #1;
      checks++;
      if (ack !== m_ack || bb_q !== m_reg) begin
        failures++;
        $display("FAIL cycle %0d: sup=%b rw=%b addr=%h ack=%b exp %b reg=%h exp %h",
                 k, sup, rw, addr, ack, m_ack, bb_q, m_reg);
      end
    end
    checks++;
    if (n_wr == 0 || n_in == 0 || n_out == 0 || n_seg == 0) begin
      failures++;
      $display("FAIL coverage wr=%0d in=%0d out=%0d seg=%0d", n_wr, n_in, n_out, n_seg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
