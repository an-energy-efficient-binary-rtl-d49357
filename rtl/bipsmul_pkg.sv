// bipsmul_pkg: types and helper functions shared by the binary-interfaced
// parallel stochastic multiplier (BipSMul) blocks.
//
// det_mode_e selects how the deterministic approach lengthens a short
// parallel bitstream: operand a is repeated, operand b is rotated, so that
// every bit of one stream meets every bit of the other exactly once.
// pair_shift() gives the left shift of the SUM output that pairs segment i of
// a with segment j of b; segment 0 is the most significant one, as in the
// numbering of the parallel bitstreams of the generator, and the shift is the
// combined weight of the two segments (n for high x high, n/2 for the cross
// terms and 0 for low x low when R = 2).
package bipsmul_pkg;

  typedef enum logic {
    DET_REPEAT = 1'b0,  // copy the stream L times
    DET_ROTATE = 1'b1   // copy it L times, rotated by one more place each time
  } det_mode_e;

  // Left shift of the product of a's segment i and b's segment j
  // (segments of K bits, R of them, segment 0 most significant).
  function automatic int unsigned pair_shift(int unsigned i, int unsigned j,
                                             int unsigned r, int unsigned k);
    return ((r - 1 - i) + (r - 1 - j)) * k;
  endfunction

endpackage
