// wtm_mult8: 8x8 multiplier, unsigned or two's complement, around the
// 7:2-compressor Wallace tree.
//
// The core (wtm8_7to2) multiplies unsigned 8-bit numbers. For
// is_signed = 1 the operands are read as two's complement: each negative
// operand is replaced by its magnitude (an 8-bit magnitude holds even
// -128 -> 128), the core multiplies the magnitudes, and the 16-bit result is
// negated when exactly one operand was negative. For is_signed = 0 a, b and p
// pass through unchanged. That the multiplier serves both signed and unsigned
// operands is published; how signed operands are handled is not, and this
// sign-magnitude wrapper is this design's choice (it leaves the published
// partial-product array untouched).
//
// Interface: a, b (8 bits), is_signed; p (16 bits) = a * b.
// Timing: purely combinational, no clock; p is valid one combinational delay
// (negate, tree, ripple adder, negate) after the inputs change.
module wtm_mult8
  import wtm_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  input  logic     is_signed,
  output product_t p
);

  logic     neg_a, neg_b, neg_p;
  operand_t mag_a, mag_b;
  product_t mag_p;

  always_comb begin
    neg_a = is_signed & a[N-1];
    neg_b = is_signed & b[N-1];
    neg_p = neg_a ^ neg_b;
    mag_a = neg_a ? operand_t'(-a) : a;
    mag_b = neg_b ? operand_t'(-b) : b;
  end

  wtm8_7to2 u_core (.a(mag_a), .b(mag_b), .p(mag_p));

  always_comb p = neg_p ? product_t'(-mag_p) : mag_p;

endmodule
