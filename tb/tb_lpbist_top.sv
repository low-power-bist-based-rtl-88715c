// tb_lpbist_top -- end-to-end testbench of the whole BIST at its default
// configuration (the fixed-length partitioning example: nine scan cells,
// chains {s2,s3,s6} and {s5,s9,s1} uniform, {s8,s7,s4} non-uniform, four
// weight sets, 65536 random patterns, 128 patterns per weight set).
//
// A small made-up combinational function stands in for the circuit under
// test and produces the captured responses. The testbench checks:
//   * every loaded pattern in the weighted phase against the weight each cell
//     must receive (uniform chains: the chain's scan weight, non-uniform
//     chain: the cell's own weight), and that R cells take both values;
//   * that the scan input of a uniform chain never changes within a weight
//     set whose scan weight is 0 or 1 (the power saving of uniform chains);
//   * that the LT-RTPG scan inputs toggle on well under half the random-phase
//     shift cycles;
//   * the final MISR signature against a testbench model fed with the
//     observed scan-out cells;
//   * the test length, (65536 + 4*128)*(3+1) + 3 cycles;
//   * transitions between neighbouring cells of the loaded patterns (each
//     one is a transition travelling down the chain while shifting), over
//     the first 512 random patterns and all weighted patterns: well below
//     the 0.5 per pair of plain pseudo-random patterns (the low-power claim).
// Each mechanism (random patterns, weighted patterns, weight set switch,
// force-0, force-1, random weight in a weight set, per-bit weighting of the
// non-uniform chain, unload, compaction) is counted and must occur.
module tb_lpbist_top;
  import lpbist_pkg::*;
  localparam int NC = 9, NCH = 3, NW = 4, SL = 3;
  localparam int NR = 65536, PP = 128;
  localparam longint RUN_CYCLES = longint'(NR + NW*PP)*(SL+1) + SL;
  // weight each cell must receive in weight sets 1..4 ('x': no requirement)
  localparam string CELL_W [NC] = '{"011r", "1011", "1011", "xxxx", "011r",
                                    "1011", "xxx1", "1rrx", "011r"};
  // scan weight of each chain ("" for the non-uniform chain)
  localparam string CHAIN_W [NCH] = '{"1011", "011r", ""};
  localparam int SO_CELL [NCH] = '{5, 0, 3};     // cells at the scan outputs
  localparam int CH_CELL [NCH][3] = '{'{1, 2, 5}, '{4, 8, 0}, '{7, 6, 3}};
  localparam int CH_LEN  [NCH]    = '{3, 3, 3};

  logic clk = 1'b0;
  logic rst_n, start;
  logic [NC-1:0] cell_d, cell_q;
  logic scan_en, weighted, busy, done;
  phase_t phase;
  logic [1:0] ws_idx;
  logic [31:0] signature;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // stand-in for the circuit's combinational logic
  always_comb
    for (int i = 0; i < NC; i++)
      cell_d[i] = cell_q[(i+1)%NC] ^ (cell_q[(i+2)%NC] & cell_q[(i+4)%NC]) ^ i[0];

  lpbist_top dut (
    .clk, .rst_n, .start, .cell_d, .cell_q, .scan_en, .phase, .weighted,
    .ws_idx, .busy, .done, .signature
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cycles;
    int n_rand_pat, n_w_pat, n_ws_switch, n_f0, n_f1, n_r, n_nu, n_unload, n_misr;
    int rand_si_toggle, rand_si_total, uni_si_toggle;
    bit saw0 [NC][NW], saw1 [NC][NW];
    bit captured;
    logic [31:0] model;
    logic [NCH-1:0] prev_si;
    int prev_ws;
    bit prev_weighted;
    real rate;
    longint tr_rand, tr_w, sh_rand, sh_w;

    cycles = 0; n_rand_pat = 0; n_w_pat = 0; n_ws_switch = 0; n_f0 = 0; n_f1 = 0;
    n_r = 0; n_nu = 0; n_unload = 0; n_misr = 0;
    rand_si_toggle = 0; rand_si_total = 0; uni_si_toggle = 0;
    captured = 1'b0; model = '0; prev_ws = 0; prev_weighted = 1'b0;
    for (int i = 0; i < NC; i++) for (int w = 0; w < NW; w++) begin saw0[i][w] = 0; saw1[i][w] = 0; end

    rst_n = 1'b0; start = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b1;
    #1 check(!busy && !done, "idle after reset");
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    prev_si = dut.si;
    tr_rand = 0; tr_w = 0; sh_rand = 0; sh_w = 0;
    while (!done && cycles < 400000) begin
      cycles++;
      // compaction model: the scan-out bits enter the MISR on every shift
      // cycle once a response has been captured
      if (scan_en && captured) begin
        logic [NCH-1:0] so;
        for (int c = 0; c < NCH; c++) so[c] = cell_q[SO_CELL[c]];
        model = {model[30:0], model[31] ^ model[21] ^ model[1] ^ model[0]} ^ {29'b0, so};
        n_misr++;
      end
      if (phase == PH_UNLOAD) n_unload++;
      if (scan_en && (phase == PH_RANDOM || phase == PH_WEIGHTED)) begin
        // scan-input activity
        for (int c = 0; c < NCH; c++) begin
          if (phase == PH_RANDOM) begin
            rand_si_total++;
            if (dut.si[c] != prev_si[c]) rand_si_toggle++;
          end else if (CHAIN_W[c] != "" && CHAIN_W[c][ws_idx] inside {"0", "1"}
                       && prev_weighted && int'(ws_idx) == prev_ws
                       && dut.si[c] != prev_si[c]) begin
            uni_si_toggle++;
          end
        end
        prev_si = dut.si;
        prev_ws = int'(ws_idx);
        prev_weighted = (phase == PH_WEIGHTED);
      end
      if (!scan_en && (phase == PH_RANDOM || phase == PH_WEIGHTED)) begin
        // capture cycle: cell_q holds the complete pattern
        captured = 1'b1;
        // transitions between neighbouring cells of each loaded pattern,
        // over the first 512 random patterns and all weighted patterns
        if (phase == PH_WEIGHTED || n_rand_pat < 512)
          for (int c = 0; c < NCH; c++)
            for (int p = 0; p + 1 < CH_LEN[c]; p++) begin
              bit t;
              t = cell_q[CH_CELL[c][p]] != cell_q[CH_CELL[c][p+1]];
              if (phase == PH_RANDOM) begin sh_rand++; tr_rand += t; end
              else                    begin sh_w++;    tr_w    += t; end
            end
        if (phase == PH_RANDOM) n_rand_pat++;
        else begin
          n_w_pat++;
          for (int i = 0; i < NC; i++) begin
            byte ch;
            ch = CELL_W[i][ws_idx];
            if (ch == "0") begin
              check(cell_q[i] == 1'b0, $sformatf("ws%0d cell s%0d must be 0", ws_idx+1, i+1));
              n_f0++;
            end else if (ch == "1") begin
              check(cell_q[i] == 1'b1, $sformatf("ws%0d cell s%0d must be 1", ws_idx+1, i+1));
              n_f1++;
            end else if (ch == "r") begin
              n_r++;
              if (cell_q[i]) saw1[i][ws_idx] = 1; else saw0[i][ws_idx] = 1;
            end
          end
          // non-uniform chain: s8 and s7 receive different forced values
          // within one load in weight set 1 (s8 = 1, s4/s7 free) and 4 (s7 = 1)
          if ((ws_idx == 0 && cell_q[7]) || (ws_idx == 3 && cell_q[6])) n_nu++;
        end
      end
      @(posedge clk); #1;
      if (phase == PH_WEIGHTED && int'(ws_idx) != prev_ws) n_ws_switch++;
    end

    check(cycles == RUN_CYCLES, $sformatf("test took %0d cycles, expected %0d", cycles, RUN_CYCLES));
    check(n_rand_pat == NR, $sformatf("%0d random patterns", n_rand_pat));
    check(n_w_pat == NW*PP, $sformatf("%0d weighted patterns", n_w_pat));
    check(signature == model, $sformatf("signature %08h, model %08h", signature, model));
    for (int i = 0; i < NC; i++)
      for (int w = 0; w < NW; w++)
        if (CELL_W[i][w] == "r")
          check(saw0[i][w] && saw1[i][w], $sformatf("R cell s%0d takes both values in ws%0d", i+1, w+1));
    rate = real'(rand_si_toggle) / real'(rand_si_total);
    $display("random phase: scan inputs toggle on %f of shift cycles", rate);
    check(rate < 0.35, "LT-RTPG keeps scan-in transitions low");
    // in a plain pseudo-random pattern half of the neighbouring cell pairs
    // differ; every such difference is a transition while shifting
    $display("pattern transitions per neighbouring cell pair: random phase %f, weighted phase %f (plain random: 0.5)",
             real'(tr_rand) / real'(sh_rand), real'(tr_w) / real'(sh_w));
    check(real'(tr_rand) / real'(sh_rand) < 0.4, "random-phase pattern transitions below plain random");
    check(real'(tr_w) / real'(sh_w) < 0.4, "weighted-phase pattern transitions below plain random");
    check(uni_si_toggle == 0, $sformatf("%0d scan-in toggles in forced uniform chains", uni_si_toggle));
    // every mechanism must have happened
    $display("mechanisms: random patterns %0d, weighted patterns %0d, weight set switches %0d",
             n_rand_pat, n_w_pat, n_ws_switch);
    $display("            forced-0 cells %0d, forced-1 cells %0d, random-weight cells %0d",
             n_f0, n_f1, n_r);
    $display("            non-uniform per-bit loads %0d, unload cycles %0d, compaction cycles %0d",
             n_nu, n_unload, n_misr);
    check(n_ws_switch == NW - 1, $sformatf("%0d weight set switches", n_ws_switch));
    check(n_f0 > 0, "force-0 happened");
    check(n_f1 > 0, "force-1 happened");
    check(n_r > 0, "random weight in a weight set happened");
    check(n_nu > 0, "non-uniform chain per-bit weighting happened");
    check(n_unload == SL, "unload happened");
    check(n_misr > 0, "compaction happened");
    check(done && !busy, "done at the end");
    $display("signature %08h", signature);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
