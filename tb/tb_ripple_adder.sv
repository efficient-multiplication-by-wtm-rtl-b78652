// tb_ripple_adder: self-check of the final ripple-carry adder at its default
// width (13 bits). Corner cases (all zeros, all ones, a carry rippling through
// every bit) and 20000 random pairs are applied; {cout, s} must equal x + y.
module tb_ripple_adder;

  localparam int unsigned W = 13;

  logic [W-1:0] x, y, s;
  logic         cout;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  ripple_adder dut (.x(x), .y(y), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] vx, input logic [W-1:0] vy);
    logic [W:0] expected;
    x = vx;
    y = vy;
    #1;
    expected = {1'b0, vx} + {1'b0, vy};
    checks++;
    if ({cout, s} != expected) begin
      failures++;
      $display("FAIL %0d + %0d -> %0d, expected %0d", vx, vy, {cout, s}, expected);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, W'(1));
    check(W'(1), '1);
    check('1, '0);
    for (int k = 0; k < W; k++) check(W'(1) << k, W'(1) << k);
    for (int n = 0; n < 20000; n++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
