// half_adder: adds two bits of equal weight.
//
// sum = a ^ b has the inputs' weight, carry = a & b has twice that weight.
// Used in the first reduction step of the multiplier (the cells marked H in
// columns 8 and 9 of the dot diagram), in columns 2 and 3 of the second step
// and as the lowest cell of the final ripple-carry adder. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
