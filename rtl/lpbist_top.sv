// lpbist_top -- low-power weighted-random BIST built on scan partitioning.
//
// The scan cells of the circuit under test are partitioned into chains so
// that most chains are "uniform": in every weight set all their cells want
// the same weight (0, 1 or R). A uniform chain is then weighted as a whole by
// a small scan weight decoder driven only by the weight counter, and its scan
// input is constant for the whole weight set whenever its weight is 0 or 1,
// which removes the shift transitions in that chain. The few remaining
// "non-uniform" chains get a conventional per-cell 3-weight decoder that also
// looks at the bit counter. Pseudo-random bits come from an LFSR through a
// low-transition generator (LT-RTPG: AND of K LFSR bits toggling one T
// flip-flop per chain). Responses are compacted in a MISR.
//
// Data path per chain c: rnd[c] (LT-RTPG) -> weight logic (force0/force1 from
// the scan weight decoder if the chain is uniform, from the 3-weight decoder
// if not) -> scan_chain -> scan-out -> MISR.
//
// Configuration, all by parameter:
//   CELL_CUBE[i][w]  weight wanted by scan cell i in weight set w (W_X = don't care)
//   CHAIN_CELL[c][p] index of the scan cell at position p (0 = scan input) of chain c
//   CHAIN_LEN[c]     length of chain c (all equal: fixed-length architecture;
//                    different: variable-length architecture)
//   UNIFORM[c]       1 if chain c is a uniform chain
// The scan weight of a uniform chain is the merge of its cells' weight cubes,
// computed at elaboration (the cells must be mutually compatible). The
// defaults are the worked example of the scan partitioning procedure: nine
// scan cells s1..s9 (indices 0..8), four weight sets, scan length 3, chains
// {s2,s3,s6} and {s5,s9,s1} uniform and {s8,s7,s4} non-uniform. The pattern
// counts (65536 random patterns, 128 per weight set) and the 32-bit LFSR are
// sizes the published scheme uses for its benchmark runs; K, the polynomials and the
// controller timing are this design's choices.
//
// Interface: clk, rst_n (synchronous, active low), start (pulse), cell_d
// (captured responses of the circuit, one per scan cell), cell_q (scan cell
// states, to the circuit), scan_en, phase, weighted, ws_idx, busy, done,
// signature (valid while done).
// Timing: one test run takes (NUM_RAND_PATS + NUM_WS*PATS_PER_WS)*(SHIFT_LEN+1)
// + SHIFT_LEN cycles, SHIFT_LEN being the longest chain.
module lpbist_top
  import lpbist_pkg::*;
#(
  parameter int unsigned NUM_WS     = 4,
  parameter int unsigned NUM_CELLS  = 9,
  parameter int unsigned NUM_CHAINS = 3,
  parameter int unsigned MAX_LEN    = 3,
  parameter weight_t CELL_CUBE [NUM_CELLS][NUM_WS] = '{
    '{W_X, W_X, W_X, W_X},   // s1 (don't care cell)
    '{W_X, W_0, W_X, W_X},   // s2
    '{W_1, W_X, W_X, W_1},   // s3
    '{W_X, W_X, W_X, W_X},   // s4 (don't care cell)
    '{W_0, W_1, W_X, W_R},   // s5
    '{W_1, W_X, W_1, W_X},   // s6
    '{W_X, W_X, W_X, W_1},   // s7
    '{W_1, W_R, W_R, W_X},   // s8
    '{W_0, W_X, W_1, W_X}    // s9
  },
  parameter int unsigned CHAIN_CELL [NUM_CHAINS][MAX_LEN] = '{
    '{1, 2, 5},              // uniform:     s2 s3 s6
    '{4, 8, 0},              // uniform:     s5 s9 s1
    '{7, 6, 3}               // non-uniform: s8 s7 s4
  },
  parameter int unsigned CHAIN_LEN [NUM_CHAINS] = '{3, 3, 3},
  parameter bit          UNIFORM   [NUM_CHAINS] = '{1'b1, 1'b1, 1'b0},
  parameter int unsigned      NUM_RAND_PATS = 65536,
  parameter int unsigned      PATS_PER_WS   = 128,
  parameter int unsigned      LFSR_W        = 32,
  parameter logic [LFSR_W-1:0] LFSR_TAPS    = LFSR_W'(32'h8020_0003),
  parameter logic [LFSR_W-1:0] LFSR_SEED    = LFSR_W'(32'h1234_5679),
  parameter int unsigned      LT_K          = 2,
  parameter int unsigned      MISR_W        = 32,
  parameter logic [MISR_W-1:0] MISR_TAPS    = MISR_W'(32'h8020_0003),
  localparam int unsigned WS_W = (NUM_WS > 1) ? $clog2(NUM_WS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NUM_CELLS-1:0] cell_d,
  output logic [NUM_CELLS-1:0] cell_q,
  output logic                 scan_en,
  output phase_t               phase,
  output logic                 weighted,
  output logic [WS_W-1:0]      ws_idx,
  output logic                 busy,
  output logic                 done,
  output logic [MISR_W-1:0]    signature
);

  // ---------------------------------------------------------------------
  // Elaboration-time derivation of the decoder tables
  // ---------------------------------------------------------------------
  function automatic int unsigned max_len();
    int unsigned m;
    m = 1;
    for (int unsigned c = 0; c < NUM_CHAINS; c++) if (CHAIN_LEN[c] > m) m = CHAIN_LEN[c];
    return m;
  endfunction

  function automatic int unsigned count_uniform();
    int unsigned n;
    n = 0;
    for (int unsigned c = 0; c < NUM_CHAINS; c++) if (UNIFORM[c]) n++;
    return n;
  endfunction

  // Index of chain c among the uniform (u = 1) or non-uniform (u = 0) chains.
  function automatic int unsigned kind_index(int unsigned c, bit u);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < c; i++) if (UNIFORM[i] == u) n++;
    return n;
  endfunction

  localparam int unsigned SHIFT_LEN = max_len();
  localparam int unsigned BC_W      = (SHIFT_LEN > 1) ? $clog2(SHIFT_LEN) : 1;
  localparam int unsigned NUM_US    = count_uniform();
  localparam int unsigned NUM_NU    = NUM_CHAINS - NUM_US;
  localparam int unsigned US_SLOTS  = (NUM_US > 0) ? NUM_US : 1;
  localparam int unsigned NU_SLOTS  = (NUM_NU > 0) ? NUM_NU : 1;

  typedef weight_t     sw_tab_t  [US_SLOTS*NUM_WS];
  typedef weight_t     nu_tab_t  [NU_SLOTS*MAX_LEN*NUM_WS];
  typedef int unsigned nu_len_t  [NU_SLOTS];

  // Scan weight of each uniform chain: merge of its cells' weight cubes.
  function automatic sw_tab_t make_scan_weights();
    sw_tab_t r;
    for (int unsigned i = 0; i < US_SLOTS*NUM_WS; i++) r[i] = W_X;
    for (int unsigned c = 0; c < NUM_CHAINS; c++)
      if (UNIFORM[c])
        for (int unsigned p = 0; p < CHAIN_LEN[c]; p++)
          for (int unsigned w = 0; w < NUM_WS; w++)
            r[kind_index(c, 1'b1)*NUM_WS + w] =
              w_merge(r[kind_index(c, 1'b1)*NUM_WS + w], CELL_CUBE[CHAIN_CELL[c][p]][w]);
    return r;
  endfunction

  // Per-cell weights of each non-uniform chain.
  function automatic nu_tab_t make_nu_weights();
    nu_tab_t r;
    for (int unsigned i = 0; i < NU_SLOTS*MAX_LEN*NUM_WS; i++) r[i] = W_X;
    for (int unsigned c = 0; c < NUM_CHAINS; c++)
      if (!UNIFORM[c])
        for (int unsigned p = 0; p < CHAIN_LEN[c]; p++)
          for (int unsigned w = 0; w < NUM_WS; w++)
            r[(kind_index(c, 1'b0)*MAX_LEN + p)*NUM_WS + w] = CELL_CUBE[CHAIN_CELL[c][p]][w];
    return r;
  endfunction

  function automatic nu_len_t make_nu_len();
    nu_len_t r;
    for (int unsigned i = 0; i < NU_SLOTS; i++) r[i] = 1;
    for (int unsigned c = 0; c < NUM_CHAINS; c++)
      if (!UNIFORM[c]) r[kind_index(c, 1'b0)] = CHAIN_LEN[c];
    return r;
  endfunction

  // 1 when every uniform chain holds mutually compatible cells.
  function automatic bit uniform_chains_ok();
    for (int unsigned c = 0; c < NUM_CHAINS; c++)
      if (UNIFORM[c])
        for (int unsigned a = 0; a < CHAIN_LEN[c]; a++)
          for (int unsigned b = 0; b < CHAIN_LEN[c]; b++)
            for (int unsigned w = 0; w < NUM_WS; w++)
              if (!w_compatible(CELL_CUBE[CHAIN_CELL[c][a]][w], CELL_CUBE[CHAIN_CELL[c][b]][w]))
                return 1'b0;
    return 1'b1;
  endfunction

  // 1 when every scan cell sits in exactly one chain position.
  function automatic bit cells_ok();
    for (int unsigned i = 0; i < NUM_CELLS; i++) begin
      int unsigned n;
      n = 0;
      for (int unsigned c = 0; c < NUM_CHAINS; c++)
        for (int unsigned p = 0; p < CHAIN_LEN[c]; p++)
          if (CHAIN_CELL[c][p] == i) n++;
      if (n != 1) return 1'b0;
    end
    return 1'b1;
  endfunction

  localparam sw_tab_t SCAN_WEIGHT = make_scan_weights();
  localparam nu_tab_t NU_WEIGHT   = make_nu_weights();
  localparam nu_len_t NU_LEN      = make_nu_len();

  initial begin
    assert (uniform_chains_ok())
      else $error("lpbist_top: a uniform chain holds cells with conflicting weights");
    assert (cells_ok())
      else $error("lpbist_top: every scan cell must be in exactly one chain position");
    for (int unsigned c = 0; c < NUM_CHAINS; c++)
      assert (CHAIN_LEN[c] >= 1 && CHAIN_LEN[c] <= MAX_LEN)
        else $error("lpbist_top: CHAIN_LEN[%0d] out of range", c);
  end

  // ---------------------------------------------------------------------
  // Controller
  // ---------------------------------------------------------------------
  logic            gen_en, misr_clr, misr_en;
  logic [BC_W-1:0] bit_cnt;

  bist_controller #(
    .NUM_WS        (NUM_WS),
    .SHIFT_LEN     (SHIFT_LEN),
    .NUM_RAND_PATS (NUM_RAND_PATS),
    .PATS_PER_WS   (PATS_PER_WS)
  ) u_ctrl (
    .clk, .rst_n, .start,
    .phase, .scan_en, .gen_en, .weighted, .ws_idx, .bit_cnt,
    .misr_clr, .misr_en, .busy, .done
  );

  // ---------------------------------------------------------------------
  // Pattern generation: LFSR -> LT-RTPG
  // ---------------------------------------------------------------------
  logic [LFSR_W-1:0]     lfsr_state;
  logic [NUM_CHAINS-1:0] rnd;

  lfsr #(.WIDTH(LFSR_W), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_lfsr (
    .clk, .rst_n, .en(gen_en), .state(lfsr_state)
  );

  lt_rtpg #(.NUM_CHAINS(NUM_CHAINS), .LFSR_W(LFSR_W), .K(LT_K)) u_ltrtpg (
    .clk, .rst_n, .en(gen_en), .lfsr_state, .rnd
  );

  // ---------------------------------------------------------------------
  // Weight decoders
  // ---------------------------------------------------------------------
  logic [US_SLOTS-1:0]   us_f0, us_f1;
  logic [NU_SLOTS-1:0]   nu_f0, nu_f1;
  logic [NUM_CHAINS-1:0] force0, force1, si, so;

  if (NUM_US > 0) begin : g_swd
    scan_weight_decoder #(
      .NUM_WS (NUM_WS), .NUM_US (NUM_US), .SCAN_WEIGHT (SCAN_WEIGHT)
    ) u_swd (
      .en (weighted), .ws_idx, .force0 (us_f0), .force1 (us_f1)
    );
  end else begin : g_no_swd
    assign us_f0 = '0;
    assign us_f1 = '0;
  end

  if (NUM_NU > 0) begin : g_twd
    three_weight_decoder #(
      .NUM_WS (NUM_WS), .NUM_NU (NUM_NU), .MAX_LEN (MAX_LEN), .SHIFT_LEN (SHIFT_LEN),
      .NU_LEN (NU_LEN), .CELL_WEIGHT (NU_WEIGHT)
    ) u_twd (
      .en (weighted), .ws_idx, .bit_cnt, .force0 (nu_f0), .force1 (nu_f1)
    );
  end else begin : g_no_twd
    assign nu_f0 = '0;
    assign nu_f1 = '0;
  end

  // ---------------------------------------------------------------------
  // Weight logic and the partitioned scan chains
  // ---------------------------------------------------------------------
  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    localparam int unsigned LEN = CHAIN_LEN[c];
    localparam int unsigned IDX = kind_index(c, UNIFORM[c]);
    logic [LEN-1:0] d, q;

    if (UNIFORM[c]) begin : g_u
      assign force0[c] = us_f0[IDX];
      assign force1[c] = us_f1[IDX];
    end else begin : g_n
      assign force0[c] = nu_f0[IDX];
      assign force1[c] = nu_f1[IDX];
    end

    for (genvar p = 0; p < LEN; p++) begin : g_cell
      assign d[p]                      = cell_d[CHAIN_CELL[c][p]];
      assign cell_q[CHAIN_CELL[c][p]]  = q[p];
    end

    scan_chain #(.LEN(LEN)) u_chain (
      .clk, .scan_en, .si(si[c]), .d, .q, .so(so[c])
    );
  end

  weight_logic #(.N(NUM_CHAINS)) u_wl (
    .rnd, .force0, .force1, .si
  );

  // ---------------------------------------------------------------------
  // Response compaction
  // ---------------------------------------------------------------------
  misr #(.WIDTH(MISR_W), .N_IN(NUM_CHAINS), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst_n, .clr(misr_clr), .en(misr_en), .din(so), .sig(signature)
  );

endmodule
