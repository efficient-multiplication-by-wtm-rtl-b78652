// tb_compressor_3to2: exhaustive self-check of the XOR/MUX full adder.
// All eight input patterns are applied; {carry, sum} must equal the count
// a + b + c, and carry must also equal the majority function ab + bc + ca.
module tb_compressor_3to2;

  logic a, b, c, sum, carry;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  compressor_3to2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> carry=%0b sum=%0b", a, b, c, carry, sum);
      end
      checks++;
      if (carry != ((a & b) | (b & c) | (c & a))) begin
        failures++;
        $display("FAIL majority a=%0b b=%0b c=%0b -> carry=%0b", a, b, c, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
