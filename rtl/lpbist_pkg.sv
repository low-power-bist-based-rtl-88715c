// lpbist_pkg -- types and elaboration-time helpers shared by the low-power
// weighted-random BIST.
//
// A weight tells how one scan cell (or a whole uniform scan chain) is loaded
// while one weight set is active: forced to 0, forced to 1, or left to the
// pseudo-random source (R). A fourth value, W_X, marks a don't care: the test
// set places no requirement on the cell in that weight set. Hardware treats
// W_X like R (the random source drives the cell); the decoders are free to
// turn a W_X into 0 or 1 when that lets two chains share one decoder output.
//
// The compatibility rule (two weights are compatible when one of them is a
// don't care or both are equal) and the merge rule are the ones the scan
// partitioning and decoder minimisation steps are built on. The 2-bit code
// values are this design's own choice.
package lpbist_pkg;

  typedef enum logic [1:0] {
    W_X = 2'd0,   // don't care
    W_0 = 2'd1,   // weighted to 0
    W_1 = 2'd2,   // weighted to 1
    W_R = 2'd3    // pseudo-random
  } weight_t;

  typedef enum logic [2:0] {
    PH_IDLE     = 3'd0,  // waiting for start
    PH_RANDOM   = 3'd1,  // LT-RTPG patterns, no weighting
    PH_WEIGHTED = 3'd2,  // 3-valued weighted patterns, one weight set at a time
    PH_UNLOAD   = 3'd3,  // shift out the last captured response
    PH_DONE     = 3'd4   // signature valid
  } phase_t;

  // Two weights conflict only when both are specified and differ.
  function automatic bit w_compatible(weight_t a, weight_t b);
    return (a == W_X) || (b == W_X) || (a == b);
  endfunction

  // Merge two compatible weights: the specified one wins.
  function automatic weight_t w_merge(weight_t a, weight_t b);
    return (a == W_X) ? b : a;
  endfunction

endpackage
