// compressor_7to2: 7:2 compressor for one column of the partial-product tree.
//
// Inputs are seven bits x[6:0] of the column's own weight and four carry-ins
// cin[3:0], which are the carry-outs of the compressor one column lower and
// also have this column's weight. Outputs are sum (this weight), carry and
// cout[3:0] (both of twice this weight). The eleven inputs are counted
// exactly:
//     x + cin  ==  sum + 2*(carry + cout[0] + cout[1] + cout[2] + cout[3])
//
// Structure: a chain of five full adders (3:2 compressors). The first adds
// x[0..2]; each further adder adds the previous adder's sum, one carry-in and
// one more x bit:
//     FA0: x0, x1, x2          -> s0, cout[0]
//     FA1: cin[0], s0, x3      -> s1, cout[1]
//     FA2: cin[1], s1, x4      -> s2, cout[2]
//     FA3: cin[2], s2, x5      -> s3, cout[3]
//     FA4: cin[3], s3, x6      -> sum, carry
// The first three adders and the way the carry-ins enter from the side are
// the published drawing of the compressor; the drawing stops after the third
// adder, and continuing the same pattern to seven inputs and four carry-ins
// is this design's choice. cout[k] depends on cin[0..k-1] only, so chaining
// compressors column to column (cout -> cin) forms no combinational loop and
// the carry path across columns is at most a few adders deep.
// Unused inputs are tied to 0 by the user. Purely combinational.
module compressor_7to2
  import wtm_pkg::*;
(
  input  logic [CX-1:0] x,
  input  logic [CC-1:0] cin,
  output logic          sum,
  output logic          carry,
  output logic [CC-1:0] cout
);

  // s[k] is the sum of adder k; s[CC] is the compressor's sum.
  logic [CC:0] s;

  compressor_3to2 u_fa0 (
    .a(x[0]), .b(x[1]), .c(x[2]), .sum(s[0]), .carry(cout[0])
  );

  for (genvar k = 1; k <= CC; k++) begin : g_chain
    if (k < CC) begin : g_mid
      compressor_3to2 u_fa (
        .a(cin[k-1]), .b(s[k-1]), .c(x[k+2]), .sum(s[k]), .carry(cout[k])
      );
    end else begin : g_last
      compressor_3to2 u_fa (
        .a(cin[k-1]), .b(s[k-1]), .c(x[k+2]), .sum(s[k]), .carry(carry)
      );
    end
  end

  assign sum = s[CC];

endmodule
