// comp_unit_tb: checks the full comparator against the integer relations
// a > b, a < b, a == b, exhaustively at 4 bits and with random and corner
// values at 32 bits.
module comp_unit_tb;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic        g4, l4, e4;
  logic [31:0] a32, b32;
  logic        g32, l32, e32;

  comp_unit #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .gt(g4),  .lt(l4),  .eq(e4));
  comp_unit               dut32 (.a(a32), .b(b32), .gt(g32), .lt(l32), .eq(e32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    a32 = x; b32 = y; #1;
    checks++;
    if ({g32, l32, e32} !== {x > y, x < y, x == y}) begin
      failures++;
      $display("FAIL 32-bit a=%h b=%h g=%b l=%b e=%b", x, y, g32, l32, e32);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if ({g4, l4, e4} !== {i > j, i < j, i == j}) begin
          failures++;
          $display("FAIL 4-bit a=%0d b=%0d g=%b l=%b e=%b", i, j, g4, l4, e4);
        end
      end
    check32(32'h0, 32'h0);
    check32(32'hFFFF_FFFF, 32'h0);
    check32(32'h0, 32'hFFFF_FFFF);
    check32(32'h8000_0000, 32'h7FFF_FFFF);
    check32(32'h1234_5678, 32'h1234_5679);
    for (int k = 0; k < 500; k++) begin
      logic [31:0] x, y;
      x = $urandom;
      y = (k % 3 == 0) ? x : (k % 3 == 1) ? x ^ (32'h1 << ($urandom % 32)) : $urandom;
      check32(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
