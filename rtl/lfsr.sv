// lfsr -- Fibonacci linear feedback shift register, the pseudo-random source
// of the BIST pattern generator.
//
// Each cycle with en high the register shifts one place towards the MSB and
// the XOR of the tapped bits enters at bit 0. TAPS is a bit mask of the
// feedback positions; the default 32'h8020_0003 (bits 31, 21, 1, 0, i.e.
// x^32 + x^22 + x^2 + x + 1) gives a maximal-length sequence of 2^32-1
// states. The 32-bit width is the LFSR size used for the smaller benchmark
// circuits; the polynomial, the seed and the synchronous active-low reset are
// this design's choices. SEED must be non-zero.
//
// Interface: clk, rst_n (synchronous, active low, loads SEED), en (advance),
// state (the whole register, read by the LT-RTPG).
// Timing: state changes on the rising edge after en is sampled high.
module lfsr #(
  parameter int unsigned      WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(32'h8020_0003),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], feedback};
  end

  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");

endmodule
