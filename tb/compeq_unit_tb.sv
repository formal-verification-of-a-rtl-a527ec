// compeq_unit_tb: checks the equality comparator exhaustively at 3 bits and
// with random, single-bit-difference and equal words at 32 bits.
module compeq_unit_tb;
  int checks = 0, failures = 0;

  logic [2:0]  a3, b3;
  logic        e3;
  logic [31:0] a32, b32;
  logic        e32;

  compeq_unit #(.WIDTH(3)) dut3  (.a(a3),  .b(b3),  .eq(e3));
  compeq_unit              dut32 (.a(a32), .b(b32), .eq(e32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j); #1;
        checks++;
        if (e3 !== (i == j)) begin
          failures++;
          $display("FAIL 3-bit a=%0d b=%0d e=%b", i, j, e3);
        end
      end
    for (int k = 0; k < 600; k++) begin
      a32 = $urandom;
      case (k % 3)
        0: b32 = a32;
        1: b32 = a32 ^ (32'h1 << (k % 32));
        default: b32 = $urandom;
      endcase
      #1;
      checks++;
      if (e32 !== (a32 == b32)) begin
        failures++;
        $display("FAIL 32-bit a=%h b=%h e=%b", a32, b32, e32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
