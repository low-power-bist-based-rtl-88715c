// weight_logic -- the per-chain gate pair that applies a 3-valued weight to
// the random scan-in bit.
//
// si = (rnd OR force1) AND NOT force0: one OR gate and one AND gate per scan
// chain, as in the weighting scheme. With both forces low the chain receives
// the pseudo-random bit (weight R); force1 makes it a 1, force0 a 0. A decoder
// never raises both for the same chain; if it did, force0 would win.
//
// Interface: rnd, force0, force1 (one bit per chain each), si (scan-in bits).
// Timing: purely combinational.
module weight_logic #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] rnd,
  input  logic [N-1:0] force0,
  input  logic [N-1:0] force1,
  output logic [N-1:0] si
);

  assign si = (rnd | force1) & ~force0;

endmodule
