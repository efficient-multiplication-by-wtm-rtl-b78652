// tb_wtm_mult8: end-to-end test of the 8x8 multiplier at its default size.
//
// Every operand pair is applied in both modes (2 x 65536 products). In
// unsigned mode p must equal a * b; in signed mode p must equal the two's
// complement product of a and b. Alongside, the test counts how often each
// mechanism of the tree actually fires, looking inside the core:
//   - the pre-reduction half adders of columns 7 and 8 produce a carry;
//   - the column-1 half adder carry and the column-2 carries are 1;
//   - each of the four carry-out positions of the 7:2 compressor row is 1
//     somewhere, and a compressor carry is 1;
//   - the final ripple adder sets the top product bit;
//   - signed mode negates an operand and the result.
// A mechanism that never fires counts as a failure.
module tb_wtm_mult8;
  import wtm_pkg::*;

  operand_t a, b;
  logic     is_signed;
  product_t p;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  wtm_mult8 dut (.a(a), .b(b), .is_signed(is_signed), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {
    M_HA_W7, M_HA_W8, M_HA_W1, M_FA_W2, M_HA_W2,
    M_COUT0, M_COUT1, M_COUT2, M_COUT3, M_CCARRY,
    M_TOP_BIT, M_NEG_OPERAND, M_NEG_RESULT, M_COUNT
  } mech_e;

  int seen [M_COUNT];

  task automatic observe();
    logic [CC-1:0] any_cout;
    any_cout = '0;
    for (int w = CMP_LO; w < PW; w++) any_cout |= dut.u_core.ccout[w];
    if (dut.u_core.c7h)              seen[M_HA_W7]++;
    if (dut.u_core.c8h)              seen[M_HA_W8]++;
    if (dut.u_core.h1c)              seen[M_HA_W1]++;
    if (dut.u_core.c2f)              seen[M_FA_W2]++;
    if (dut.u_core.c2h)              seen[M_HA_W2]++;
    if (any_cout[0])                 seen[M_COUT0]++;
    if (any_cout[1])                 seen[M_COUT1]++;
    if (any_cout[2])                 seen[M_COUT2]++;
    if (any_cout[3])                 seen[M_COUT3]++;
    if (dut.u_core.ccar != '0)       seen[M_CCARRY]++;
    if (dut.u_core.p[PW-1])          seen[M_TOP_BIT]++;
    if (dut.neg_a || dut.neg_b)      seen[M_NEG_OPERAND]++;
    if (dut.neg_p)                   seen[M_NEG_RESULT]++;
  endtask

  initial begin
    product_t expected;
    foreach (seen[m]) seen[m] = 0;
    for (int mode = 0; mode < 2; mode++) begin
      is_signed = mode[0];
      for (int va = 0; va < (1 << N); va++) begin
        for (int vb = 0; vb < (1 << N); vb++) begin
          a = N'(va);
          b = N'(vb);
          #1;
          if (is_signed) expected = PW'($signed(a) * $signed(b));
          else           expected = PW'(va * vb);
          checks++;
          if (p !== expected) begin
            failures++;
            if (failures < 10)
              $display("FAIL signed=%0b %0d * %0d -> %h, expected %h",
                       is_signed, va, vb, p, expected);
          end
          observe();
        end
      end
    end
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-14s fired %0d times", me.name(), seen[m]);
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never fired", me.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
