// Shared constants of the programmable rank-order filter.
//
// The filter selects the r-th smallest of the m newest input words with a
// bit-serial algorithm: one majority (threshold) decision per bit plane,
// MSB first, in a bit-level pipeline with one stage per bit. The sizes below
// are the filter's main configuration: 8-bit words, a window of up to 31
// words, and 5-bit control words for the window size and the rank.
package rof_pkg;
  parameter int unsigned WORD_W  = 8;   // sample word length
  parameter int unsigned MAX_WIN = 31;  // maximum window size (words)
  parameter int unsigned CTRL_W  = 5;   // width of the window-size and rank control words

  // Settings used out of reset (this design's choice): a 31-word median filter.
  parameter int unsigned RESET_WIN  = 31;
  parameter int unsigned RESET_RANK = 16;
endpackage
