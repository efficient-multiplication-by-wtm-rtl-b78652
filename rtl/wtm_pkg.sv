// wtm_pkg: sizes shared by the 8x8 Wallace tree multiplier (WTM) built from
// 7:2 compressors.
//
// The operand width of 8 bits, the 7 column inputs of a compressor and its
// 4 carry-ins / carry-outs are the published 8x8 arrangement. The column plan
// in wtm8_7to2 is worked out for exactly these sizes, so they are constants
// here rather than module parameters.
package wtm_pkg;

  localparam int unsigned N    = 8;      // operand width in bits
  localparam int unsigned PW   = 2 * N;  // product width in bits
  localparam int unsigned CX   = 7;      // column inputs of one 7:2 compressor
  localparam int unsigned CC   = 4;      // carry-ins (= carry-outs) of one 7:2 compressor

  // Lowest column (bit weight) handled by a 7:2 compressor; columns 0..2 are
  // reduced by a wire, a half adder and a full adder.
  localparam int unsigned CMP_LO = 3;

  typedef logic [N-1:0]  operand_t;
  typedef logic [PW-1:0] product_t;

endpackage
