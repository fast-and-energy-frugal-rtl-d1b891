// vc_pkg: shared types for the bit-flip decompression test logic.
//
// The decompression unit can build its location decoder in one of three
// ways, all producing the same flip strobes for the same location code:
//   DEC_FLAT - a plain log2(M)-to-M decoder with enable (the basic scheme),
//   DEC_TREE - a tree of 1-to-2 decoders, one tree level per code bit, which
//              lets the decoder be spread out near the cells it drives,
//   DEC_PAIR - a reduced-area variant: a decoder one input narrower picks a
//              pair of toggle cells and the code's least significant bit
//              picks the cell of the pair that flips.
package vc_pkg;

  typedef enum logic [1:0] {
    DEC_FLAT = 2'd0,
    DEC_TREE = 2'd1,
    DEC_PAIR = 2'd2
  } dec_style_e;

  // Width of a location code for a core with m inputs: ceil(log2(m)), at least 1.
  function automatic int unsigned code_width(input int unsigned m);
    return (m <= 2) ? 1 : $clog2(m);
  endfunction

endpackage
