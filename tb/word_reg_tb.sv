// word_reg_tb: drives random load / clear / data and compares the register
// with a reference model each cycle: clear wins, then load, else hold; the
// register is zero after reset.
module word_reg_tb;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] i, q, model;
  logic        ld, clr;

  word_reg dut (.clk, .rst_n, .i, .ld, .clr, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i = '0; ld = 0; clr = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1;
    model = '0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      i   = $urandom;
      ld  = ($urandom % 2) == 1;
      clr = ($urandom % 5) == 0;
      @(posedge clk);
      model = clr ? '0 : ld ? i : model;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h (ld=%b clr=%b)", k, q, model, ld, clr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
