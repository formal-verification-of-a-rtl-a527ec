// pgck_tlm_tb: random writes and compares (compares often hit the stored
// page) against a reference model of the page check rule:
//   wc = 1: register <= addr, ack = 1;  wc = 0: ack = (register == addr),
// with ack one cycle after its inputs.
module pgck_tlm_tb;
  int checks = 0, failures = 0;
  int hits = 0, misses = 0, writes = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] addr, reg_q, m_reg;
  logic        wc, ack, m_ack;

  pgck_tlm dut (.clk, .rst_n, .addr, .wc, .reg_q, .ack);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; wc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_reg = '0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      wc   = ($urandom % 4) == 0;
      addr = (($urandom % 2) == 0) ? m_reg : $urandom;
      @(posedge clk);
      if (wc) begin m_ack = 1'b1; m_reg = addr; writes++; end
      else begin
        m_ack = (m_reg == addr);
        if (m_ack) hits++; else misses++;
      end
      #1;
      checks++;
      if (ack !== m_ack || reg_q !== m_reg) begin
        failures++;
        $display("FAIL cycle %0d: ack=%b exp %b reg=%h exp %h", k, ack, m_ack, reg_q, m_reg);
      end
    end
    checks++;
    if (hits == 0 || misses == 0 || writes == 0) begin
      failures++;
      $display("FAIL coverage hits=%0d misses=%0d writes=%0d", hits, misses, writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
