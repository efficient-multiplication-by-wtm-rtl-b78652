// tb_pp_gen: exhaustive self-check of the 8x8 partial-product generator.
// For every pair of operands, each partial product must be b[i] & a[j], and
// the weighted sum of all 64 partial products must equal a * b.
module tb_pp_gen;

  localparam int unsigned N = 8;

  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned acc, bad;
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        a = N'(va);
        b = N'(vb);
        #1;
        acc = 0;
        bad = 0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            if (pp[i][j] != 1'((vb >> i) & (va >> j) & 1)) bad++;
            acc += int'(pp[i][j]) << (i + j);
          end
        checks++;
        if (bad != 0 || acc != int'(unsigned'(va * vb))) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d: %0d wrong bits, sum %0d", va, vb, bad, acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
