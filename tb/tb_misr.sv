// tb_misr -- self-checking testbench for misr.
//
// An 8-bit, 3-input MISR (taps x^8+x^6+x^5+x^4+1) is fed random inputs with
// random enables and compared with a testbench model of the register. A
// second instance receives the same stream with one input bit flipped; its
// signature must differ. clr must empty the register.
module tb_misr;
  logic clk = 1'b0;
  logic rst_n, clr, en;
  logic [2:0] din, din_b;
  logic [7:0] sig, sig_b, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr #(.WIDTH(8), .N_IN(3), .TAPS(8'hB8)) dut  (.clk, .rst_n, .clr, .en, .din, .sig);
  misr #(.WIDTH(8), .N_IN(3), .TAPS(8'hB8)) dutb (.clk, .rst_n, .clr, .en, .din(din_b), .sig(sig_b));

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
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; din = '0; din_b = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    model = '0;
    check(sig == 8'h00, "reset clears");
    for (int i = 0; i < 500; i++) begin
      en = (i == 100) || (($urandom % 5) != 0);
      din = 3'($urandom);
      din_b = (i == 100) ? din ^ 3'b010 : din;
      @(posedge clk); #1;
      if (en) model = {model[6:0], model[7] ^ model[5] ^ model[4] ^ model[3]} ^ {5'b0, din};
      check(sig == model, $sformatf("cycle %0d: sig %02h expected %02h", i, sig, model));
    end
    check(sig_b != sig, "a single flipped response bit changes the signature");
    clr = 1'b1;
    @(posedge clk); #1;
    clr = 1'b0;
    check(sig == 8'h00, "clr empties the register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
