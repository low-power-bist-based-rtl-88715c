// tb_three_weight_decoder -- self-checking testbench for three_weight_decoder.
//
// Instance 1 (defaults): the non-uniform chain s8 s7 s4 of the fixed-length
// example, shift length 3. The bit entered at bit count t lands in position
// 2-t, so the decoder must output the weight of that cell in the active
// weight set. Instance 2: a 2-cell non-uniform chain in a design whose longest
// chain is 4; the first two bits of each load fall out of the chain and must
// stay random (no force). With en low nothing is forced.
module tb_three_weight_decoder;
  import lpbist_pkg::*;
  // weights of the cells from scan input to scan output, weight sets 1..4
  localparam string CELL [3] = '{"1rrx", "xxx1", "xxxx"};
  localparam string CELL2 [2] = '{"01r1", "1x00"};
  logic       en;
  logic [1:0] ws, bc;
  logic [0:0] f0, f1, g0, g1;
  int checks = 0, failures = 0;

  three_weight_decoder dut (.en, .ws_idx(ws), .bit_cnt(bc), .force0(f0), .force1(f1));

  three_weight_decoder #(
    .NUM_WS(4), .NUM_NU(1), .MAX_LEN(3), .SHIFT_LEN(4), .NU_LEN('{2}),
    .CELL_WEIGHT('{W_0, W_1, W_R, W_1,  W_1, W_X, W_0, W_0,  W_1, W_1, W_1, W_1})
  ) dut2 (.en, .ws_idx(ws), .bit_cnt(bc), .force0(g0), .force1(g1));

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
    en = 1'b1;
    #1;
    for (int w = 0; w < 4; w++)
      for (int t = 0; t < 4; t++) begin
        byte ch;
        ws = 2'(w); bc = 2'(t);
        #1;
        if (t < 3) begin
          ch = CELL[2 - t][w];
          check(f0[0] == (ch == "0") && f1[0] == (ch == "1"),
                $sformatf("ws%0d bit%0d: f0=%b f1=%b, cell weight %c", w+1, t, f0, f1, ch));
        end
        if (t < 2) ch = "r";
        else       ch = CELL2[3 - t][w];
        check(g0[0] == (ch == "0") && g1[0] == (ch == "1"),
              $sformatf("short chain ws%0d bit%0d: f0=%b f1=%b, expected %c", w+1, t, g0, g1, ch));
      end
    en = 1'b0;
    for (int w = 0; w < 4; w++)
      for (int t = 0; t < 4; t++) begin
        ws = 2'(w); bc = 2'(t);
        #1;
        check(f0 == '0 && f1 == '0 && g0 == '0 && g1 == '0, "nothing forced with en low");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
