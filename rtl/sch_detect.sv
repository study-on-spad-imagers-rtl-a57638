// sch_detect: global search completion detection.
//
// Every row raises a flag when its search signal has reached the rightmost
// pixel. The flags are combined by an AND tree: SCH_fin is high when every
// row has been searched to its end, i.e. when all breakdown pixels have been
// extracted. Built here as a balanced tree of 2-input ANDs (log2(ROWS)
// levels), like the gate tree of the original; purely combinational.
module sch_detect #(
  parameter int unsigned ROWS = 31
) (
  input  logic [ROWS-1:0] row_fin,
  output logic            sch_fin
);

  localparam int unsigned LEAVES = 1 << $clog2(ROWS);

  // Tree nodes in heap order: node n has children 2n and 2n+1, leaves at LEAVES..
  logic [2*LEAVES-1:0] node;

  always_comb begin
    node = '1;
    for (int unsigned r = 0; r < ROWS; r++) node[LEAVES + r] = row_fin[r];
    for (int unsigned n = LEAVES - 1; n >= 1; n--) node[n] = node[2*n] & node[2*n + 1];
  end

  assign sch_fin = node[1];

endmodule
