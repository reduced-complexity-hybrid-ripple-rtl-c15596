// hrcla_pkg: constants shared by the hybrid ripple-carry/lookahead adder.
//
// The HRCLA is built from 4-bit blocks. Inside a block the carries into
// bits 1..3 come from a 3-bit two-level lookahead network, and the carry out
// of bit 3 (and the block's carry out) comes from rippling C3 through a plain
// full adder. Those two sizes are those of the published HRCLA; they are fixed here so that
// every module agrees on them.
package hrcla_pkg;

  // Width of one HRCLA block.
  localparam int unsigned BLOCK_W = 4;

  // Bits of a block whose carries are produced by lookahead; the last bit
  // of the block (BLOCK_W-1) is added by a rippling full adder.
  localparam int unsigned LOOKAHEAD_W = BLOCK_W - 1;

endpackage
