// vbb_mmu_tb: translation MMU against a reference model. Supervisor: ack,
// address passes unchanged, rw to REG_ADDR|1 loads the protection register
// and rw to REG_ADDR loads the translate register. User: valid when the
// segment matches and the offset is within bounds; then ack and the address
// becomes {translate[31:16], addr[15:0]}, otherwise no ack and the address
// passes unchanged. Results appear one cycle after the request.
module vbb_mmu_tb;
  localparam logic [31:0] RA = 32'hFFFF_FFF0;
  int checks = 0, failures = 0;
  int n_wbb = 0, n_wva = 0, n_xlat = 0, n_fail = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] addr, data, bb_q, va_q, out_addr, m_bb, m_va, m_out;
  logic        sup, rw, ack, m_ack, ok;

  vbb_mmu dut (.clk, .rst_n, .addr, .data, .sup, .rw, .bb_q, .va_q, .ack, .out_addr);

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
    m_bb = '0; m_va = '0;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      sup  = ($urandom % 3) == 0;
      rw   = ($urandom % 2) == 0;
      data = $urandom;
      case ($urandom % 5)
        0: addr = RA;
        1: addr = RA | 32'h1;
        2: addr = {m_bb[31:15], 15'($urandom)};
        3: addr = {m_bb[31:16], 16'($urandom_range(0, 32'(m_bb[15:0])))};
        default: addr = $urandom;
      endcase
      @(posedge clk);
      ok = (addr[31:15] == m_bb[31:15]) && (addr[15:0] <= m_bb[15:0]);
      if (sup) begin
        m_ack = 1'b1;
        m_out = addr;
        if (rw && addr[31:1] == RA[31:1]) begin
          if (addr[0]) begin m_bb = data; n_wbb++; end
          else begin m_va = data; n_wva++; end
        end
      end else if (ok) begin
        m_ack = 1'b1;
        m_out = {m_va[31:16], addr[15:0]};
        n_xlat++;
      end else begin
        m_ack = 1'b0;
        m_out = addr;
        n_fail++;
      end
      #1;
      checks++;
      if (ack !== m_ack || out_addr !== m_out || bb_q !== m_bb || va_q !== m_va) begin
        failures++;
        $display("FAIL cycle %0d: sup=%b rw=%b addr=%h ack=%b/%b out=%h/%h",
                 k, sup, rw, addr, ack, m_ack, out_addr, m_out);
      end
    end
    checks++;
    if (n_wbb == 0 || n_wva == 0 || n_xlat == 0 || n_fail == 0) begin
      failures++;
      $display("FAIL coverage wbb=%0d wva=%0d xlat=%0d fail=%0d", n_wbb, n_wva, n_xlat, n_fail);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
