// compressor_3to2: the 3:2 compressor, i.e. a full adder, in XOR/MUX form.
//
// Three bits of equal weight become a sum bit of that weight and a carry bit
// of twice that weight: sum + 2*carry = a + b + c. The first XOR forms
// t = a ^ b; a second XOR gives sum = t ^ c; a 2:1 multiplexer steered by t
// gives the carry. When a and b differ, the carry equals c; when they agree,
// both equal the carry, so a is passed. This equals the majority function
// ab + bc + ca. The XOR-XOR-MUX structure is the published one; which data
// input the multiplexer passes for each value of t is this design's reading
// of it. Purely combinational.
module compressor_3to2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic t;

  always_comb begin
    t     = a ^ b;
    sum   = t ^ c;
    carry = t ? c : a;
  end

endmodule
