// pp_gen: partial-product generator of an N x N unsigned multiplier.
//
// N*N two-input AND gates form every partial product in parallel, as in
// long-hand multiplication: pp[i][j] = b[i] & a[j] has weight 2^(i+j).
// Row i of the output is a shifted copy of a gated by bit i of b, before
// shifting. Purely combinational.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp   // pp[i][j] = b[i] & a[j]
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        pp[i][j] = b[i] & a[j];
      end
    end
  end

endmodule
