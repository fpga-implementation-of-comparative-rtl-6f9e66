// Shared constants of the 64-bit LFSR family.
//
// All five generators hold a 64-bit state, load it from a 64-bit seed and
// advance one step per clock while enabled. This package fixes the register
// length, the default feedback polynomial and the default mask value so that
// every generator, the top and the testbenches agree on them.
//
// The feedback polynomial is x^64 + x^63 + x^61 + x^60 + 1, a primitive
// polynomial, so each linear generator built from it runs through all
// 2^64 - 1 nonzero states. Its Galois realisation puts XOR gates in front of
// state bits 62, 60 and 59, which are the XOR gates the Galois schematic
// names; the tap sets of the other generators are this design's choice.
package lfsr_pkg;

  // Register length of every generator.
  localparam int unsigned LFSR_W = 64;

  typedef logic [LFSR_W-1:0] lfsr_word_t;

  // Fibonacci form, shifting toward bit 0: the new bit entering bit 63 is the
  // XOR of the state bits flagged here (bits 0, 1, 3 and 4).
  localparam lfsr_word_t FIB_TAPS = 64'h0000_0000_0000_001B;

  // Galois form, shifting toward bit 0: the bit leaving bit 0 re-enters at
  // bit 63 and is XORed into each next-state bit flagged here (62, 60, 59).
  localparam lfsr_word_t GAL_TAPS = 64'h5800_0000_0000_0000;

  // Constant Boolean mask of the masked generator: the register stores the
  // true state XOR this value.
  localparam lfsr_word_t MASK_DEFAULT = 64'hA5C3_5A3C_96E1_69F0;

  // Controls shared by all generators, decoded once per cycle.
  typedef enum logic [1:0] {
    OP_LOAD = 2'd0,  // register takes the seed (reset, or start low)
    OP_STEP = 2'd1   // register advances one step
  } lfsr_op_e;

  // reset and start decide what the register does in a cycle.
  function automatic lfsr_op_e decode_op(input logic reset, input logic start);
    return (reset || !start) ? OP_LOAD : OP_STEP;
  endfunction

endpackage
