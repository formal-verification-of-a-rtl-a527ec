// pgck_sup_tlm_tb: random requests with the supervisor line, compared with
// the rule "the write command is wc & sup": a supervisor write stores addr
// and acknowledges; any other request acknowledges only on a match. Counts
// refused user writes to be sure that case is exercised.
module pgck_sup_tlm_tb;
  int checks = 0, failures = 0;
  int user_writes = 0, sup_writes = 0, hits = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] addr, reg_q, m_reg;
  logic        wc, sup, ack, m_ack, x;

  pgck_sup_tlm dut (.clk, .rst_n, .addr, .wc, .sup, .reg_q, .ack);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; wc = 0; sup = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_reg = '0;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      wc   = ($urandom % 3) == 0;
      sup  = ($urandom % 2) == 0;
      addr = (($urandom % 2) == 0) ? m_reg : $urandom;
      @(posedge clk);
      x = wc & sup;
      if (wc & !sup) user_writes++;
      if (x) begin m_reg = addr; m_ack = 1'b1; sup_writes++; end
      else begin m_ack = (m_reg == addr); if (m_ack) hits++; end
      #1;
      checks++;
      if (ack !== m_ack || reg_q !== m_reg) begin
        failures++;
        $display("FAIL cycle %0d: wc=%b sup=%b ack=%b exp %b reg=%h exp %h",
                 k, wc, sup, ack, m_ack, reg_q, m_reg);
      end
    end
    checks++;
    if (user_writes == 0 || sup_writes == 0 || hits == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
