// tb_bist_controller -- self-checking testbench for bist_controller.
//
// Small run: 3 weight sets, shift length 3, 5 random patterns, 4 patterns per
// weight set. Checked: the cycle count of a run against
// (5 + 3*4)*(3+1) + 3; the number of shift and capture cycles in each phase
// and weight set; the bit counter running 0,1,2 in every pattern; the MISR
// enable staying low until the first capture and covering the unload; the
// weight counter stepping 0,1,2; done/busy; and a second run after done.
module tb_bist_controller;
  import lpbist_pkg::*;
  localparam int NW = 3, SL = 3, NR = 5, PP = 4;
  localparam int RUN_CYCLES = (NR + NW*PP)*(SL+1) + SL;
  logic clk = 1'b0;
  logic rst_n, start;
  phase_t phase;
  logic scan_en, gen_en, weighted, misr_clr, misr_en, busy, done;
  logic [1:0] ws_idx, bit_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller #(.NUM_WS(NW), .SHIFT_LEN(SL), .NUM_RAND_PATS(NR), .PATS_PER_WS(PP)) dut (
    .clk, .rst_n, .start, .phase, .scan_en, .gen_en, .weighted, .ws_idx, .bit_cnt,
    .misr_clr, .misr_en, .busy, .done
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    int cycles, rand_shift, rand_cap, unload, misr_cycles, exp_bit, captures;
    int ws_cap [NW];
    cycles = 0; rand_shift = 0; rand_cap = 0; unload = 0; misr_cycles = 0;
    exp_bit = 0; captures = 0;
    for (int w = 0; w < NW; w++) ws_cap[w] = 0;
    start = 1'b1;
    #1 check(misr_clr, "misr_clr with start");
    @(posedge clk); #1;
    start = 1'b0;
    while (!done && cycles < 1000) begin
      cycles++;
      check(busy, "busy during the run");
      if (phase == PH_RANDOM || phase == PH_WEIGHTED) begin
        check(weighted == (phase == PH_WEIGHTED), "weighted flag follows phase");
        if (scan_en) begin
          check(gen_en, "generators advance on shift cycles");
          check(int'(bit_cnt) == exp_bit, $sformatf("bit counter %0d, expected %0d", bit_cnt, exp_bit));
          exp_bit = (exp_bit + 1) % SL;
          if (phase == PH_RANDOM) rand_shift++;
        end else begin
          check(!gen_en, "generators hold on capture cycles");
          check(exp_bit == 0, "capture follows a full load");
          if (phase == PH_RANDOM) rand_cap++;
          else ws_cap[ws_idx]++;
          captures++;
        end
      end else if (phase == PH_UNLOAD) begin
        check(scan_en && misr_en, "unload shifts into the MISR");
        unload++;
      end
      if (misr_en) misr_cycles++;
      check(!(misr_en && captures == 0), "no compaction before the first capture");
      @(posedge clk); #1;
    end
    check(cycles == RUN_CYCLES, $sformatf("run took %0d cycles, expected %0d", cycles, RUN_CYCLES));
    check(rand_cap == NR && rand_shift == NR*SL, "random phase pattern and shift counts");
    for (int w = 0; w < NW; w++)
      check(ws_cap[w] == PP, $sformatf("weight set %0d applied %0d patterns", w, ws_cap[w]));
    check(unload == SL, "unload length");
    check(misr_cycles == (NR + NW*PP - 1)*SL + SL, $sformatf("MISR cycles %0d", misr_cycles));
    check(done && !busy && phase == PH_DONE, "done");
    repeat (3) @(posedge clk);
    #1 check(done && !scan_en, "waits in done");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b1;
    check(phase == PH_IDLE && !busy && !done && !scan_en, "idle after reset");
    repeat (2) @(posedge clk);
    #1 check(phase == PH_IDLE, "stays idle without start");
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
