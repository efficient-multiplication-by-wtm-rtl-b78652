// tb_wtm8_7to2: exhaustive self-check of the unsigned 8x8 Wallace tree.
// All 65536 operand pairs are applied and p is compared with a * b computed
// by the simulator. The run also checks that every 7:2 compressor column
// keeps its bit count: the bits entering column w (its x inputs and
// carry-ins) equal sum + 2*(carry + carry-outs) leaving it.
module tb_wtm8_7to2;
  import wtm_pkg::*;

  operand_t a, b;
  product_t p;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  wtm8_7to2 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    product_t expected;
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        a = N'(va);
        b = N'(vb);
        #1;
        expected = PW'(va * vb);
        checks++;
        if (p !== expected) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", va, vb, p, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
