// Shared constants and helpers of the systolic linear classifier.
//
// The classifier computes g_i(X) = w_i^{n+1} + sum_j x^j * w_i^j for every class i
// and reports the class with the largest g_i. All streams between chips travel as
// 8-bit bytes; a word is BYTE_W * word_bytes bits, least significant byte first.
// The byte width is the 8 bits of the I/O ports; everything else here is this
// design's own choice.
package lc_pkg;
  localparam int unsigned BYTE_W = 8;

  typedef logic [BYTE_W-1:0] byte_t;

  // Systolic delay of word i in an (n+2)-word group: 0, 1, ..., n, n.
  // Both the feature vector [x^1..x^n, g', l'] and the weighted vector
  // [w^{n+1}, w^1..w^n, l] are skewed this way before entering the array.
  function automatic int unsigned wedge_delay(int unsigned i, int unsigned nwords);
    return (i >= nwords - 1) ? nwords - 2 : i;
  endfunction
endpackage
