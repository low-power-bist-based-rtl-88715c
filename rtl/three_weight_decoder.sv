// three_weight_decoder -- conventional 3-valued weight decoder for the
// non-uniform scan chains.
//
// In a non-uniform chain every scan cell has its own weight, so the decoder
// needs both the weight counter (which weight set is active) and the bit
// counter (which cell the bit now entering the chain will end up in). This
// is the costly part of the weighting hardware; scan partitioning exists to
// keep these chains few and short.
//
// CELL_WEIGHT is flattened: entry (n*MAX_LEN + p)*NUM_WS + w is the weight of
// the cell at position p of non-uniform chain n in weight set w. Position 0 is
// the cell next to the scan input, NU_LEN[n]-1 the one at the scan output.
// A pattern is loaded in SHIFT_LEN shift cycles (the longest chain of the
// design); the bit entered at bit count t ends at position SHIFT_LEN-1-t, so
// the decoder reverses the order. Bits entered while p is past the end of a
// shorter chain fall out of it and are left random. The published scheme has the
// decoder produced by two-level logic synthesis of this table; here the table
// is written as a lookup and synthesis derives the logic.
//
// Interface: en (weighted phase), ws_idx (weight counter), bit_cnt (bit
// counter, 0 .. SHIFT_LEN-1), force0/force1 (one bit per non-uniform chain).
// Timing: combinational.
module three_weight_decoder
  import lpbist_pkg::*;
#(
  parameter int unsigned NUM_WS    = 4,
  parameter int unsigned NUM_NU    = 1,
  parameter int unsigned MAX_LEN   = 3,
  parameter int unsigned SHIFT_LEN = 3,
  parameter int unsigned NU_LEN [NUM_NU] = '{3},
  // Default: the non-uniform chain of the fixed-length partitioning example,
  // cells s8 (1 R R x), s7 (x x x 1), s4 (x x x x) from scan input to output.
  parameter weight_t CELL_WEIGHT [NUM_NU*MAX_LEN*NUM_WS] = '{
    W_1, W_R, W_R, W_X,
    W_X, W_X, W_X, W_1,
    W_X, W_X, W_X, W_X
  },
  localparam int unsigned WS_W = (NUM_WS > 1) ? $clog2(NUM_WS) : 1,
  localparam int unsigned BC_W = (SHIFT_LEN > 1) ? $clog2(SHIFT_LEN) : 1
) (
  input  logic              en,
  input  logic [WS_W-1:0]   ws_idx,
  input  logic [BC_W-1:0]   bit_cnt,
  output logic [NUM_NU-1:0] force0,
  output logic [NUM_NU-1:0] force1
);

  // Weight of the cell that the bit now being shifted in will occupy.
  weight_t sel [NUM_NU];

  always_comb begin
    for (int unsigned n = 0; n < NUM_NU; n++) begin
      sel[n] = W_X;
      for (int unsigned t = 0; t < SHIFT_LEN; t++)
        for (int unsigned w = 0; w < NUM_WS; w++)
          if (bit_cnt == BC_W'(t) && ws_idx == WS_W'(w) && (SHIFT_LEN - 1 - t) < NU_LEN[n])
            sel[n] = CELL_WEIGHT[(n*MAX_LEN + SHIFT_LEN - 1 - t)*NUM_WS + w];
    end
  end

  for (genvar n = 0; n < NUM_NU; n++) begin : g_force
    assign force0[n] = en && (sel[n] == W_0);
    assign force1[n] = en && (sel[n] == W_1);
  end

  initial begin
    for (int unsigned n = 0; n < NUM_NU; n++)
      assert (NU_LEN[n] <= MAX_LEN && NU_LEN[n] <= SHIFT_LEN)
        else $error("three_weight_decoder: chain %0d longer than MAX_LEN/SHIFT_LEN", n);
  end

endmodule
