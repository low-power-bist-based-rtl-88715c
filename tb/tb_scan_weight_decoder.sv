// tb_scan_weight_decoder -- self-checking testbench for scan_weight_decoder.
//
// Uses the decoder-minimisation example: five uniform chains, five weight
// sets. Chains 1, 3 and 4 (numbered from 1) have mutually compatible scan
// weights, as do chains 2 and 5, so exactly two decoders must remain and
// chains in one group must receive identical controls in every weight set.
// Every specified weight must be applied (0 -> force0, 1 -> force1), and with
// en low nothing is forced.
module tb_scan_weight_decoder;
  import lpbist_pkg::*;
  localparam int NW = 5, NU = 5;
  // expected scan weights, one row per chain, written as characters
  localparam string SW [NU] = '{"11xxx", "x0101", "xx01x", "1x010", "00xx1"};
  logic       en;
  logic [2:0] ws;
  logic [NU-1:0] f0, f1;
  int checks = 0, failures = 0;

  scan_weight_decoder dut (.en, .ws_idx(ws), .force0(f0), .force1(f1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut.NUM_DEC == 2, $sformatf("%0d decoders, expected 2", dut.NUM_DEC));
    en = 1'b1;
    for (int w = 0; w < NW; w++) begin
      ws = 3'(w);
      #1;
      for (int c = 0; c < NU; c++) begin
        byte ch;
        ch = SW[c][w];
        check(!(f0[c] && f1[c]), "never both forces");
        if (ch == "0") check(f0[c] && !f1[c], $sformatf("ws%0d chain%0d forced 0", w+1, c+1));
        if (ch == "1") check(f1[c] && !f0[c], $sformatf("ws%0d chain%0d forced 1", w+1, c+1));
      end
      // shared decoders: groups {1,3,4} and {2,5}
      check(f0[0] == f0[2] && f0[0] == f0[3] && f1[0] == f1[2] && f1[0] == f1[3],
            $sformatf("ws%0d chains 1,3,4 share a decoder", w+1));
      check(f0[1] == f0[4] && f1[1] == f1[4], $sformatf("ws%0d chains 2,5 share a decoder", w+1));
    end
    en = 1'b0;
    for (int w = 0; w < NW; w++) begin
      ws = 3'(w);
      #1;
      check(f0 == '0 && f1 == '0, "nothing forced in the random phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
