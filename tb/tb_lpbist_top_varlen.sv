// tb_lpbist_top_varlen -- end-to-end testbench of the BIST in the
// variable-length scan architecture.
//
// The same nine scan cells and four weight sets as the fixed-length example,
// but the number of chains (3) is fixed instead of their length: the three
// partitions of the clique cover become chains {s2,s3,s6,s7}, {s5,s9,s1,s4}
// (the don't-care cells s1 and s4 balance the second chain) and {s8}. All
// three are uniform, so no 3-weight decoder is built, and a pattern takes
// four shift cycles (the longest chain). Run shortened to 200 random patterns
// and 16 patterns per weight set. The checks are those of tb_lpbist_top:
// per-cell weights of every weighted pattern, both values on R cells, constant
// scan inputs of forced uniform chains, low LT-RTPG activity, the MISR
// signature against a model, the test length (200 + 4*16)*(4+1) + 4 cycles,
// and that each mechanism occurs.
module tb_lpbist_top_varlen;
  import lpbist_pkg::*;
  localparam int NC = 9, NCH = 3, NW = 4, SL = 4;
  localparam int NR = 200, PP = 16;
  localparam longint RUN_CYCLES = longint'(NR + NW*PP)*(SL+1) + SL;
  // weight each cell must receive in weight sets 1..4 ('x': no requirement)
  localparam string CELL_W [NC] = '{"011r", "1011", "1011", "011r", "011r",
                                    "1011", "1011", "1rrx", "011r"};
  // scan weight of each chain ("" for the non-uniform chain)
  localparam string CHAIN_W [NCH] = '{"1011", "011r", "1rrx"};
  localparam int SO_CELL [NCH] = '{6, 3, 7};     // cells at the scan outputs

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

  // chain tables, typed so that their sizes follow the overridden MAX_LEN
  typedef int unsigned cells_t [NCH][4];
  typedef int unsigned lens_t  [NCH];
  typedef bit          flags_t [NCH];
  localparam cells_t CHAIN_CELL = '{'{1, 2, 5, 6}, '{4, 8, 0, 3}, '{7, 0, 0, 0}};
  localparam lens_t  CHAIN_LEN  = '{4, 4, 1};
  localparam flags_t UNIFORM    = '{1'b1, 1'b1, 1'b1};

  lpbist_top #(
    .MAX_LEN       (4),
    .CHAIN_CELL    (CHAIN_CELL),
    .CHAIN_LEN     (CHAIN_LEN),
    .UNIFORM       (UNIFORM),
    .NUM_RAND_PATS (NR),
    .PATS_PER_WS   (PP)
  ) dut (
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
    repeat (5000) @(posedge clk);
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
    while (!done && cycles < 10000) begin
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
          // the one-cell chain {s8} is loaded although the shift takes four
          // cycles: in weight set 1 it must hold a 1
          if (ws_idx == 0 && cell_q[7]) n_nu++;
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
    check(uni_si_toggle == 0, $sformatf("%0d scan-in toggles in forced uniform chains", uni_si_toggle));
    // every mechanism must have happened
    $display("mechanisms: random patterns %0d, weighted patterns %0d, weight set switches %0d",
             n_rand_pat, n_w_pat, n_ws_switch);
    $display("            forced-0 cells %0d, forced-1 cells %0d, random-weight cells %0d",
             n_f0, n_f1, n_r);
    $display("            short-chain loads %0d, unload cycles %0d, compaction cycles %0d",
             n_nu, n_unload, n_misr);
    check(n_ws_switch == NW - 1, $sformatf("%0d weight set switches", n_ws_switch));
    check(n_f0 > 0, "force-0 happened");
    check(n_f1 > 0, "force-1 happened");
    check(n_r > 0, "random weight in a weight set happened");
    check(n_nu > 0, "short chain loaded correctly");
    check(dut.NUM_NU == 0 && dut.NUM_US == 3, "all chains uniform, no 3-weight decoder");
    check(n_unload == SL, "unload happened");
    check(n_misr > 0, "compaction happened");
    check(done && !busy, "done at the end");
    $display("signature %08h", signature);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
