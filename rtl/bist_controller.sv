// bist_controller -- test sequencer with the bit, pattern and weight counters.
//
// A test run has two parts: first NUM_RAND_PATS pseudo-random patterns from
// the low-transition generator for the easy faults, then PATS_PER_WS weighted
// patterns for each of the NUM_WS weight sets in turn for the random-pattern-
// resistant faults. Every pattern takes SHIFT_LEN shift cycles (scan_en high,
// bit counter 0 .. SHIFT_LEN-1; SHIFT_LEN is the longest scan chain) followed
// by one capture cycle (scan_en low). After the last pattern the chains are
// shifted once more (PH_UNLOAD) so that the last response reaches the MISR,
// and the controller waits in PH_DONE with done high until the next start.
//
// The weight counter (ws_idx) feeds both decoders; the bit counter only the
// 3-weight decoder of the non-uniform chains. The order random-then-weighted
// and the counters follow the published scheme; the counter encodings, one capture
// cycle per pattern, the unload phase and the MISR enable rule are this
// design's choices. misr_en is high on shift cycles once at least one
// response has been captured, so the unknown power-up content of the scan
// cells never reaches the signature.
//
// Interface: clk, rst_n (synchronous, active low), start (pulse, taken in
// PH_IDLE or PH_DONE), phase, scan_en, gen_en (advance LFSR and toggle
// flip-flops), weighted (decoders active), ws_idx, bit_cnt, misr_clr,
// misr_en, busy, done.
// Timing: a run takes (NUM_RAND_PATS + NUM_WS*PATS_PER_WS)*(SHIFT_LEN+1)
// + SHIFT_LEN cycles from the cycle after start to the first cycle of done.
module bist_controller
  import lpbist_pkg::*;
#(
  parameter int unsigned NUM_WS        = 4,
  parameter int unsigned SHIFT_LEN     = 3,
  parameter int unsigned NUM_RAND_PATS = 65536,
  parameter int unsigned PATS_PER_WS   = 128,
  localparam int unsigned WS_W = (NUM_WS > 1) ? $clog2(NUM_WS) : 1,
  localparam int unsigned BC_W = (SHIFT_LEN > 1) ? $clog2(SHIFT_LEN) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output phase_t          phase,
  output logic            scan_en,
  output logic            gen_en,
  output logic            weighted,
  output logic [WS_W-1:0] ws_idx,
  output logic [BC_W-1:0] bit_cnt,
  output logic            misr_clr,
  output logic            misr_en,
  output logic            busy,
  output logic            done
);

  logic        capture;   // this cycle is the capture cycle of a pattern
  logic        captured;  // at least one response is in the chains
  logic [31:0] pat_cnt;   // patterns finished in the current phase / weight set

  wire last_bit = (bit_cnt == BC_W'(SHIFT_LEN - 1));
  wire running  = (phase == PH_RANDOM) || (phase == PH_WEIGHTED);
  wire idle     = (phase == PH_IDLE) || (phase == PH_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      capture  <= 1'b0;
      captured <= 1'b0;
      pat_cnt  <= '0;
      ws_idx   <= '0;
      bit_cnt  <= '0;
    end else if (idle) begin
      if (start) begin
        phase    <= (NUM_RAND_PATS > 0) ? PH_RANDOM : PH_WEIGHTED;
        capture  <= 1'b0;
        captured <= 1'b0;
        pat_cnt  <= '0;
        ws_idx   <= '0;
        bit_cnt  <= '0;
      end
    end else if (phase == PH_UNLOAD) begin
      if (last_bit) begin
        phase   <= PH_DONE;
        bit_cnt <= '0;
      end else begin
        bit_cnt <= bit_cnt + 1'b1;
      end
    end else if (!capture) begin
      // shift cycle
      if (last_bit) begin
        capture <= 1'b1;
        bit_cnt <= '0;
      end else begin
        bit_cnt <= bit_cnt + 1'b1;
      end
    end else begin
      // capture cycle: one pattern finished
      capture  <= 1'b0;
      captured <= 1'b1;
      if (phase == PH_RANDOM) begin
        if (pat_cnt == 32'(NUM_RAND_PATS - 1)) begin
          phase   <= PH_WEIGHTED;
          pat_cnt <= '0;
          ws_idx  <= '0;
        end else begin
          pat_cnt <= pat_cnt + 1;
        end
      end else begin
        if (pat_cnt == 32'(PATS_PER_WS - 1)) begin
          pat_cnt <= '0;
          if (ws_idx == WS_W'(NUM_WS - 1)) phase  <= PH_UNLOAD;
          else                             ws_idx <= ws_idx + 1'b1;
        end else begin
          pat_cnt <= pat_cnt + 1;
        end
      end
    end
  end

  assign scan_en  = (running && !capture) || (phase == PH_UNLOAD);
  assign gen_en   = running && !capture;
  assign weighted = (phase == PH_WEIGHTED);
  assign misr_en  = scan_en && captured;
  assign misr_clr = idle && start;
  assign busy     = !idle;
  assign done     = (phase == PH_DONE);

  initial assert (NUM_WS > 0 && PATS_PER_WS > 0 && SHIFT_LEN > 0)
    else $error("bist_controller: NUM_WS, PATS_PER_WS and SHIFT_LEN must be positive");

endmodule
