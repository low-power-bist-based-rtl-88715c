// tb_weight_logic -- exhaustive self-checking testbench for weight_logic.
//
// Every combination of random bit, force0 and force1 on three chains is
// applied; the expected scan-in bit is 0 when force0 is set, otherwise 1
// when force1 is set, otherwise the random bit.
module tb_weight_logic;
  localparam int N = 3;
  logic [N-1:0] rnd, f0, f1, si;
  int checks = 0, failures = 0;

  weight_logic #(.N(N)) dut (.rnd, .force0(f0), .force1(f1), .si);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (3*N)); v++) begin
      logic [N-1:0] exp_si;
      {rnd, f0, f1} = (3*N)'(v);
      #1;
      for (int c = 0; c < N; c++)
        exp_si[c] = f0[c] ? 1'b0 : (f1[c] ? 1'b1 : rnd[c]);
      checks++;
      if (si !== exp_si) begin
        failures++;
        $display("FAIL: rnd=%b f0=%b f1=%b si=%b expected %b", rnd, f0, f1, si, exp_si);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
