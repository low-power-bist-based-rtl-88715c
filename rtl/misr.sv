// misr -- multiple-input signature register that compacts the scan-out bits
// of all chains into one signature.
//
// On every cycle with en high the register shifts one place towards the MSB
// with the XOR of its tapped bits fed back into bit 0, and the N_IN input bits
// are XORed into bits 0 .. N_IN-1. clr (synchronous) empties it before a test.
// The published scheme only says that responses are compacted on chip; the MISR
// structure, width and polynomial (same as the pattern LFSR) are this
// design's choices.
//
// Interface: clk, rst_n (synchronous, active low), clr, en, din[N_IN], sig.
// Timing: sig updates on the rising edge after en is sampled high.
module misr #(
  parameter int unsigned      WIDTH = 32,
  parameter int unsigned      N_IN  = 3,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(32'h8020_0003)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [N_IN-1:0]  din,
  output logic [WIDTH-1:0] sig
);

  logic feedback;
  assign feedback = ^(sig & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) sig <= '0;
    else if (en)       sig <= {sig[WIDTH-2:0], feedback} ^ WIDTH'(din);
  end

  initial assert (N_IN <= WIDTH) else $error("misr: more inputs than register bits");

endmodule
