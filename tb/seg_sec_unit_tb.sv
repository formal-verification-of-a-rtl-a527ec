// seg_sec_unit_tb: random descriptors, request types and offsets; the
// registered ok must equal "available, every requested right granted, and
// offset <= size" for the inputs of the previous cycle. Counts passes and
// each reason for refusal.
module seg_sec_unit_tb;
  import mmu_pkg::*;
  int checks = 0, failures = 0;
  int n_ok = 0, n_avail = 0, n_right = 0, n_size = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] vaddr, desc0;
  rwe_t        rwe;
  logic        ok, m_ok, av, rt, sz;

  seg_sec_unit dut (.clk, .rst_n, .vaddr, .desc0, .rwe, .ok);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vaddr = '0; desc0 = '0; rwe = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      vaddr = $urandom;
      desc0 = $urandom;
      if ($urandom % 2 == 0) desc0[31] = 1'b1;
      if ($urandom % 2 == 0) desc0[30:28] = 3'b111;
      rwe   = rwe_t'(3'b001 << ($urandom % 3));
      if ($urandom % 2 == 0) vaddr[15:0] = 16'($urandom_range(0, 32'(desc0[15:0])));
      av = desc0[31];
      rt = (!rwe.r || desc0[30]) && (!rwe.w || desc0[29]) && (!rwe.e || desc0[28]);
      sz = vaddr[15:0] <= desc0[15:0];
      m_ok = av && rt && sz;
      if (m_ok) n_ok++;
      else if (!av) n_avail++;
      else if (!rt) n_right++;
      else n_size++;
      @(posedge clk); #1;
      checks++;
      if (ok !== m_ok) begin
        failures++;
        $display("FAIL cycle %0d vaddr=%h desc0=%h rwe=%b ok=%b exp %b", k, vaddr, desc0, rwe, ok, m_ok);
      end
    end
    checks++;
    if (n_ok == 0 || n_avail == 0 || n_right == 0 || n_size == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
