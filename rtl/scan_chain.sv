// scan_chain -- one mux-D scan chain of the circuit under test.
//
// With scan_en high every cell takes its neighbour's value: si enters cell 0
// and cell LEN-1 drives so. With scan_en low each cell captures its
// functional input d[i] (the circuit's response). Scan cells have no reset:
// their content after power-up is whatever they capture or are shifted.
// Which cells of the circuit form a chain is set by scan partitioning; the
// order inside the chain is free and does not matter to the weighting. The
// mux-D cell is this design's choice of scan style.
//
// Interface: clk, scan_en, si, d[LEN], q[LEN] (cell states, to the circuit),
// so (= q[LEN-1]). Timing: one shift or capture per rising edge.
module scan_chain #(
  parameter int unsigned LEN = 3
) (
  input  logic           clk,
  input  logic           scan_en,
  input  logic           si,
  input  logic [LEN-1:0] d,
  output logic [LEN-1:0] q,
  output logic           so
);

  always_ff @(posedge clk) begin
    if (scan_en) q <= (LEN > 1) ? {q[LEN-2:0], si} : LEN'(si);
    else         q <= d;
  end

  assign so = q[LEN-1];

endmodule
