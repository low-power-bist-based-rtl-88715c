// tb_lfsr -- self-checking testbench for lfsr.
//
// An 8-bit instance with taps x^8+x^6+x^5+x^4+1 must visit all 255 non-zero
// states exactly once before returning to its seed, and hold its state while
// en is low. The default 32-bit instance is compared step by step with the
// recurrence of x^32 + x^22 + x^2 + x + 1 written out in the testbench.
module tb_lfsr;
  logic clk = 1'b0;
  logic rst_n, en;
  logic [7:0]  s8;
  logic [31:0] s32;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr #(.WIDTH(8), .TAPS(8'hB8), .SEED(8'h01)) u8 (.clk, .rst_n, .en, .state(s8));
  lfsr u32 (.clk, .rst_n, .en, .state(s32));

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
    bit [255:0]  seen;
    int          period;
    logic [31:0] ref32;
    logic [7:0]  held;
    rst_n = 1'b0; en = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    check(s8 == 8'h01, "8-bit seed loaded");
    check(s32 == 32'h1, "32-bit seed loaded");
    // hold
    held = s8;
    repeat (3) @(posedge clk);
    #1 check(s8 == held, "state held while en low");
    // full period of the 8-bit register
    seen = '0;
    period = 0;
    en = 1'b1;
    ref32 = 32'h1;
    do begin
      check(s8 != 8'h00, "never the all-zero state");
      check(!seen[s8], $sformatf("state %02h visited once", s8));
      seen[s8] = 1'b1;
      @(posedge clk); #1;
      period++;
      ref32 = {ref32[30:0], ref32[31] ^ ref32[21] ^ ref32[1] ^ ref32[0]};
      if (period < 300) check(s32 == ref32, $sformatf("32-bit step %0d", period));
    end while (s8 != 8'h01 && period < 300);
    check(period == 255, $sformatf("period %0d, expected 255", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
