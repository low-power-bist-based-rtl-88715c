// tb_scan_chain -- self-checking testbench for scan_chain.
//
// Random shift and capture cycles are applied to a 4-cell chain and to a
// 1-cell chain; a bit-level model of the chain in the testbench predicts q
// and so after every edge.
module tb_scan_chain;
  logic clk = 1'b0;
  logic scan_en, si;
  logic [3:0] d4, q4, m4;
  logic [0:0] d1, q1, m1;
  logic so4, so1;
  int checks = 0, failures = 0;
  int shifts = 0, captures = 0;

  always #5 clk = ~clk;

  scan_chain #(.LEN(4)) u4 (.clk, .scan_en, .si, .d(d4), .q(q4), .so(so4));
  scan_chain #(.LEN(1)) u1 (.clk, .scan_en, .si, .d(d1), .q(q1), .so(so1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
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
    // start from a known content by capturing
    scan_en = 1'b0; si = 1'b0; d4 = 4'b1010; d1 = 1'b1;
    @(posedge clk); #1;
    m4 = 4'b1010; m1 = 1'b1;
    check(q4 == m4 && q1 == m1, "initial capture");
    for (int i = 0; i < 1000; i++) begin
      scan_en = ($urandom % 4) != 0;
      si = 1'($urandom);
      d4 = 4'($urandom);
      d1 = 1'($urandom);
      @(posedge clk); #1;
      if (scan_en) begin
        m4 = {m4[2:0], si};
        m1 = si;
        shifts++;
      end else begin
        m4 = d4;
        m1 = d1;
        captures++;
      end
      check(q4 == m4, $sformatf("cycle %0d: q4 %b expected %b", i, q4, m4));
      check(so4 == m4[3], "so4 is last cell");
      check(q1 == m1 && so1 == m1[0], "1-cell chain");
    end
    check(shifts > 0 && captures > 0, "both shift and capture exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
