// nco_pkg: default sizes shared by the NCO blocks.
//
// The default sizes are those of the cdma2000 3X carrier-separation NCO:
// a 13-bit phase accumulator (L), 8 phase bits kept after rounding (M),
// 8-bit sine samples (N) and a fine phase tuner whose denominator and
// numerator are 4-bit binary numbers (FT_W).
//
// Weights of the fine phase tuner: for a free-running counter that repeats
// 0..A-1, counter bit i rises w(i) times per counter period; w(i) is the
// weight the bit converter gives pulse line D[i] of the rising-edge
// detector. Every step k -> k+1 (k = 0..A-2) raises exactly one bit, the
// lowest zero bit of k, and the wrap A-1 -> 0 raises none, so bit i rises
// once for every j in 1..A-1 whose lowest set bit is bit i:
//   w(i) = floor((A-1)/2^i) - floor((A-1)/2^(i+1)).
package nco_pkg;

  localparam int unsigned L_BITS  = 13;  // phase accumulator width
  localparam int unsigned M_BITS  = 8;   // phase bits addressing the sine table
  localparam int unsigned N_BITS  = 8;   // sine sample width
  localparam int unsigned FT_W    = 4;   // fine tuner denominator/numerator width

endpackage
