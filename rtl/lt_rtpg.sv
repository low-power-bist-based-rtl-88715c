// lt_rtpg -- low-transition random pattern generator, one output per scan
// chain.
//
// For every chain, K bits of the LFSR are ANDed together; when the AND is 1
// the chain's toggle flip-flop flips. The flip-flop output is the chain's
// random scan-in bit. Because the AND is 1 with probability 1/2^K, the
// scan-in value changes on only about 1/2^K of the shift cycles instead of
// 1/2, which cuts the switching activity in the scan chains. The AND-into-
// toggle-flip-flop structure is the one of the LT-RTPG; K = 2 and the choice
// of taps (chain c uses LFSR bits (c*K + j) mod LFSR_W, j = 0..K-1, spread so
// that neighbouring chains see different bits) are this design's choices.
//
// Interface: clk, rst_n (synchronous, clears the toggle flip-flops), en
// (a shift cycle: the toggle flip-flops may flip), lfsr_state, rnd.
// Timing: rnd changes on the rising edge after en is sampled high; it is read
// by the weight logic in the same shift cycle that the LFSR advances.
module lt_rtpg #(
  parameter int unsigned NUM_CHAINS = 3,
  parameter int unsigned LFSR_W     = 32,
  parameter int unsigned K          = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [LFSR_W-1:0]     lfsr_state,
  output logic [NUM_CHAINS-1:0] rnd
);

  logic [NUM_CHAINS-1:0] toggle;

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    logic [K-1:0] taps;
    for (genvar j = 0; j < K; j++) begin : g_tap
      assign taps[j] = lfsr_state[(c*K + j) % LFSR_W];
    end
    assign toggle[c] = &taps;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rnd <= '0;
    else if (en) rnd <= rnd ^ toggle;
  end

endmodule
