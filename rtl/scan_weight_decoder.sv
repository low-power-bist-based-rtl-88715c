// scan_weight_decoder -- weight decoder for the uniform scan chains.
//
// All cells of a uniform scan chain carry the same weight in every weight
// set (the chain's "scan weight"), so the decoder needs only the weight
// counter, not the bit counter. SCAN_WEIGHT[c*NUM_WS + w] is the scan weight of
// uniform chain c in weight set w.
//
// Decoder minimisation: chains whose scan weights are compatible in every
// weight set (no position where both are specified and differ) share one
// decoder output. At elaboration the chains are grouped greedily: each chain
// joins the first existing group it is compatible with, and the group's
// weight cube becomes the merge of its members (specified values replace
// don't cares). NUM_DEC is the number of decoders that remain; each drives
// one force0/force1 pair that is fanned out to its member chains. The greedy
// grouping follows the heuristic covering used for partitioning; taking the
// chains in index order is this design's choice.
//
// Weight R and an unresolved don't care both leave the chain random.
// With en low (random phase) no chain is forced.
//
// Interface: en, ws_idx (weight counter), force0/force1 (one bit per uniform
// chain). Timing: combinational.
module scan_weight_decoder
  import lpbist_pkg::*;
#(
  parameter int unsigned NUM_WS = 5,
  parameter int unsigned NUM_US = 5,
  // Scan weights, flattened: entry c*NUM_WS + w is the weight of uniform
  // chain c in weight set w. Default: the five scan weights of the decoder
  // minimisation example (one row per chain, weight sets 1..5 left to right).
  parameter weight_t SCAN_WEIGHT [NUM_US*NUM_WS] = '{
    W_1, W_1, W_X, W_X, W_X,
    W_X, W_0, W_1, W_0, W_1,
    W_X, W_X, W_0, W_1, W_X,
    W_1, W_X, W_0, W_1, W_0,
    W_0, W_0, W_X, W_X, W_1
  },
  localparam int unsigned WS_W = (NUM_WS > 1) ? $clog2(NUM_WS) : 1
) (
  input  logic              en,
  input  logic [WS_W-1:0]   ws_idx,
  output logic [NUM_US-1:0] force0,
  output logic [NUM_US-1:0] force1
);

  // Result of the greedy grouping, flattened into one table so that it can be
  // computed by a single constant function:
  //   [c]                              decoder index of uniform chain c
  //   [NUM_US]                         number of decoders
  //   [NUM_US+1 + g*NUM_WS + w]        weight of decoder g in weight set w
  localparam int unsigned TAB_LEN = NUM_US + 1 + NUM_US * NUM_WS;
  localparam int unsigned CUBE_AT = NUM_US + 1;
  typedef int unsigned tab_t [TAB_LEN];

  function automatic tab_t make_groups();
    tab_t        r;
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < TAB_LEN; i++) r[i] = 0;
    for (int unsigned g = 0; g < NUM_US; g++)
      for (int unsigned w = 0; w < NUM_WS; w++) r[CUBE_AT + g*NUM_WS + w] = int'(W_X);
    for (int unsigned c = 0; c < NUM_US; c++) begin
      bit placed;
      placed = 1'b0;
      for (int unsigned g = 0; g < n; g++) begin
        bit ok;
        ok = !placed;
        for (int unsigned w = 0; w < NUM_WS; w++)
          if (!w_compatible(weight_t'(r[CUBE_AT + g*NUM_WS + w]), SCAN_WEIGHT[c*NUM_WS + w]))
            ok = 1'b0;
        if (ok) begin
          for (int unsigned w = 0; w < NUM_WS; w++)
            r[CUBE_AT + g*NUM_WS + w] =
              int'(w_merge(weight_t'(r[CUBE_AT + g*NUM_WS + w]), SCAN_WEIGHT[c*NUM_WS + w]));
          r[c]   = g;
          placed = 1'b1;
        end
      end
      if (!placed) begin
        for (int unsigned w = 0; w < NUM_WS; w++)
          r[CUBE_AT + n*NUM_WS + w] = int'(SCAN_WEIGHT[c*NUM_WS + w]);
        r[c] = n;
        n    = n + 1;
      end
    end
    r[NUM_US] = n;
    return r;
  endfunction

  localparam tab_t        GROUPS  = make_groups();
  localparam int unsigned NUM_DEC = GROUPS[NUM_US];

  // One decoder per group: force values selected by the weight counter.
  logic [NUM_US-1:0] dec0, dec1;

  always_comb begin
    dec0 = '0;
    dec1 = '0;
    for (int unsigned g = 0; g < NUM_DEC; g++)
      for (int unsigned w = 0; w < NUM_WS; w++)
        if (ws_idx == WS_W'(w)) begin
          dec0[g] = (weight_t'(GROUPS[CUBE_AT + g*NUM_WS + w]) == W_0);
          dec1[g] = (weight_t'(GROUPS[CUBE_AT + g*NUM_WS + w]) == W_1);
        end
  end

  // Fan each decoder out to its member chains.
  always_comb begin
    for (int unsigned c = 0; c < NUM_US; c++) begin
      force0[c] = en & dec0[GROUPS[c]];
      force1[c] = en & dec1[GROUPS[c]];
    end
  end

endmodule
