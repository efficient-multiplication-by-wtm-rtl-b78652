// ripple_adder: final carry-propagate adder of the multiplier.
//
// Adds two W-bit rows x and y: {cout, s} = x + y. Bit 0 is a half adder;
// every higher bit is a full adder (3:2 compressor) taking x, y and the carry
// rippling up from the bit below, as in the last row of the published dot
// diagram. The carry of the top bit is cout. Purely combinational; the delay
// grows linearly with W.
module ripple_adder #(
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:1] c;  // c[k] is the carry into bit k

  half_adder u_ha (.a(x[0]), .b(y[0]), .sum(s[0]), .carry(c[1]));

  for (genvar k = 1; k < W; k++) begin : g_fa
    compressor_3to2 u_fa (
      .a(x[k]), .b(y[k]), .c(c[k]), .sum(s[k]), .carry(c[k+1])
    );
  end

  assign cout = c[W];

endmodule
