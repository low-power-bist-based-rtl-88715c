// tb_lt_rtpg -- self-checking testbench for lt_rtpg.
//
// The LFSR state is driven with random words. Each chain's toggle flip-flop
// is modelled in the testbench from the tap rule (chain c ANDs bits c*K+j
// mod LFSR_W) and compared every cycle. The measured fraction of cycles on
// which an output changes must be close to 1/2^K, the low-transition
// property, and nothing may change while en is low.
module tb_lt_rtpg;
  localparam int NC = 3, W = 8, K = 2;
  logic clk = 1'b0;
  logic rst_n, en;
  logic [W-1:0]  st;
  logic [NC-1:0] rnd, model, prev;
  int checks = 0, failures = 0;
  int changes = 0, steps = 0;

  always #5 clk = ~clk;

  lt_rtpg #(.NUM_CHAINS(NC), .LFSR_W(W), .K(K)) dut (.clk, .rst_n, .en, .lfsr_state(st), .rnd);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate;
    rst_n = 1'b0; en = 1'b0; st = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    model = '0;
    check(rnd == '0, "cleared by reset");
    for (int i = 0; i < 4000; i++) begin
      st = W'($urandom);
      en = (i % 10) != 9;
      prev = rnd;
      @(posedge clk); #1;
      if (en) begin
        for (int c = 0; c < NC; c++) begin
          bit t;
          t = 1'b1;
          for (int j = 0; j < K; j++) t &= st[(c*K + j) % W];
          model[c] ^= t;
        end
        steps += NC;
        for (int c = 0; c < NC; c++) if (rnd[c] != prev[c]) changes++;
      end
      check(rnd == model, $sformatf("cycle %0d: rnd %b expected %b", i, rnd, model));
    end
    rate = real'(changes) / real'(steps);
    $display("transition rate %f (expected about %f)", rate, 1.0 / (1 << K));
    check(rate > 0.20 && rate < 0.30, "transition rate near 1/2^K");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
