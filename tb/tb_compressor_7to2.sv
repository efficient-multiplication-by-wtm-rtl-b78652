// tb_compressor_7to2: exhaustive self-check of the 7:2 compressor.
// All 2^11 patterns of x[6:0] and cin[3:0] are applied. Checked for each:
//  - the count is kept: popcount(x) + popcount(cin)
//                       == sum + 2*(carry + popcount(cout));
//  - the chain structure: cout[0] is the majority of x[0..2] alone, and
//    cout[k] does not depend on cin[k..3] (checked by flipping those bits).
module tb_compressor_7to2;
  import wtm_pkg::*;

  logic [CX-1:0] x;
  logic [CC-1:0] cin;
  logic          sum, carry;
  logic [CC-1:0] cout;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  compressor_7to2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int in_cnt, out_cnt;
    logic [CC-1:0] cout0;
    for (int v = 0; v < (1 << (CX + CC)); v++) begin
      {cin, x} = (CX + CC)'(v);
      #1;
      in_cnt  = $countones(x) + $countones(cin);
      out_cnt = int'(sum) + 2 * (int'(carry) + $countones(cout));
      checks++;
      if (in_cnt != out_cnt) begin
        failures++;
        $display("FAIL x=%b cin=%b: in %0d, out %0d (sum=%0b carry=%0b cout=%b)",
                 x, cin, in_cnt, out_cnt, sum, carry, cout);
      end
      checks++;
      if (cout[0] != ((x[0] & x[1]) | (x[1] & x[2]) | (x[0] & x[2]))) begin
        failures++;
        $display("FAIL cout[0] x=%b cin=%b", x, cin);
      end
      // cout[k] may only see cin[0..k-1]: flip cin[3:k] and compare.
      cout0 = cout;
      for (int k = 0; k < CC; k++) begin
        cin = cin ^ (CC'(4'hF) << k);
        #1;
        checks++;
        if (cout[k] != cout0[k]) begin
          failures++;
          $display("FAIL cout[%0d] depends on cin[%0d..3], x=%b", k, k, x);
        end
        cin = cin ^ (CC'(4'hF) << k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
