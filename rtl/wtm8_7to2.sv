// wtm8_7to2: unsigned 8x8 Wallace tree multiplier (WTM) reduced by 7:2
// compressors.
//
// Columns are numbered by bit weight w = 0..15 (the dot diagram counts them
// from 1, so its column k is w = k-1 here). The 64 partial products from
// pp_gen stand in column w = i+j, giving heights 1,2,..,8,..,2,1.
//
// Step 1, pre-reduction. Only the two tallest columns exceed seven bits after
// carries arrive, so two half adders trim them (as published): the first two
// bits of w=7 go to a half adder whose sum stays in w=7 and whose carry joins
// w=8; the first two bits of w=8 go to a half adder whose sum stays in w=8 and
// whose carry joins w=9. Every column is now at most seven bits high.
//
// Step 2, compression.
//   w=0      the single bit is P0.
//   w=1      a half adder; its sum is P1.
//   w=2      a full adder on the three bits; its sum and the carry of the w=1
//            half adder meet in a second half adder whose sum is P2.
//   w=3..15  one 7:2 compressor per column, unused x inputs tied to 0. The
//            carry-ins of w=3 are the full-adder carry of w=2 and three zeros;
//            the carry-ins of every higher column are the carry-outs of the
//            compressor below it.
// The published plan names 7:2 compressors for w=3..11 and only a full adder
// / half adder for w=12 and w=13. Those columns also receive the four
// carry-outs of the compressor below, which a single adder cannot absorb, so
// this design continues the compressor row to w=15 (w=15 holds carry-outs
// only). With the inputs that stay 0, the compressor at w=12 starts with a
// full adder on that column's three bits and the one at w=13 with a full
// adder whose third input is 0, i.e. a half adder, as published.
//
// Step 3, final addition (ripple_adder, 13 bits). Column w >= 3 holds the
// compressor sum of w and the compressor carry of w-1; w=3 holds the carry of
// the second w=2 half adder in that place. The adder starts with a half adder
// at w=3 (P3) and ripples through full adders to w=15 (P15).
//
// The product of two 8-bit numbers fits in 16 bits, so the carries leaving
// column 15 (compressor carry and carry-outs of w=15, adder carry-out) are
// always 0; they are left unconnected and checked by an assertion.
// Purely combinational.
module wtm8_7to2
  import wtm_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);

  logic [N-1:0][N-1:0] pp;

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  // Bit k of column w, counting from the lowest row i that reaches w.
  function automatic logic col_bit(input logic [N-1:0][N-1:0] m,
                                   input int unsigned w, input int unsigned k);
    int unsigned i;
    i = ((w >= N) ? (w - N + 1) : 0) + k;
    return m[i][w-i];
  endfunction

  // ---------------- step 1: half adders in columns 7 and 8 ----------------
  logic s7h, c7h, s8h, c8h;

  half_adder u_ha_w7 (
    .a(col_bit(pp, N-1, 0)), .b(col_bit(pp, N-1, 1)), .sum(s7h), .carry(c7h)
  );
  half_adder u_ha_w8 (
    .a(col_bit(pp, N, 0)), .b(col_bit(pp, N, 1)), .sum(s8h), .carry(c8h)
  );

  // ---------------- step 2: columns 0..2 ----------------------------------
  logic h1c, s2f, c2f, c2h;

  assign p[0] = col_bit(pp, 0, 0);

  half_adder u_ha_w1 (
    .a(col_bit(pp, 1, 0)), .b(col_bit(pp, 1, 1)), .sum(p[1]), .carry(h1c)
  );
  compressor_3to2 u_fa_w2 (
    .a(col_bit(pp, 2, 0)), .b(col_bit(pp, 2, 1)), .c(col_bit(pp, 2, 2)),
    .sum(s2f), .carry(c2f)
  );
  half_adder u_ha_w2 (.a(s2f), .b(h1c), .sum(p[2]), .carry(c2h));

  // ---------------- step 2: 7:2 compressor row, columns 3..15 -------------
  logic [CX-1:0] cx   [PW];   // compressor x inputs per column
  logic [CC-1:0] ccin [CMP_LO:PW-1];  // compressor carry-ins per column
  logic [CC-1:0] ccout[CMP_LO:PW-1];  // compressor carry-outs per column
  logic [PW-1:CMP_LO] csum, ccar;     // compressor sum / carry per column

  // Column heights: pp bits left after step 1, plus the step-1 bits.
  always_comb begin
    int unsigned n, h, first;
    for (int unsigned w = 0; w < PW; w++) begin
      cx[w] = '0;
      h     = (w < N) ? (w + 1) : (2 * N - 1 - w);
      first = (w == N - 1 || w == N) ? 2 : 0;   // bits taken by step 1
      n     = 0;
      if (w == N - 1) begin
        cx[w][n] = s7h; n++;
      end
      if (w == N) begin
        cx[w][n] = s8h; n++;
        cx[w][n] = c7h; n++;
      end
      if (w == N + 1) begin
        cx[w][n] = c8h; n++;
      end
      for (int unsigned k = first; k < h; k++) begin
        if (n < CX) cx[w][n] = col_bit(pp, w, k);
        n++;
      end
    end
  end

  for (genvar w = CMP_LO; w < PW; w++) begin : g_col
    if (w == CMP_LO) begin : g_first
      assign ccin[w] = {{(CC-1){1'b0}}, c2f};
    end else begin : g_next
      assign ccin[w] = ccout[w-1];
    end
    compressor_7to2 u_cmp (
      .x(cx[w]), .cin(ccin[w]), .sum(csum[w]), .carry(ccar[w]), .cout(ccout[w])
    );
  end

  // ---------------- step 3: final ripple-carry addition -------------------
  localparam int unsigned RW = PW - CMP_LO;   // 13 bits, columns 3..15
  logic rc_out;

  ripple_adder #(.W(RW)) u_cpa (
    .x   (csum[PW-1:CMP_LO]),
    .y   ({ccar[PW-2:CMP_LO], c2h}),
    .s   (p[PW-1:CMP_LO]),
    .cout(rc_out)
  );

  // Nothing may carry out of the top column of a 16-bit product.
  always_comb begin
    assert (!(rc_out || ccar[PW-1] || (ccout[PW-1] != '0)))
      else $error("wtm8_7to2: carry left column %0d", PW - 1);
  end

endmodule
