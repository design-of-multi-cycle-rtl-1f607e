// Basic "compare and rearrange" operation of the even-odd sort.
//
// A gt_comparator decides whether x1 > x2. Multiplexer M1 passes the
// smaller number to y1 and multiplexer M2 the larger one to y2. Equal
// inputs pass straight through. This is the operational unit every sorter
// in the library is built from; it is purely combinational. Comparator plus
// two multiplexers follows the source design; driving the multiplexers
// straight from the comparator's active-low output is this design's own.
module compare_exchange #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic [W-1:0] y1,   // min(x1, x2)
  output logic [W-1:0] y2    // max(x1, x2)
);

  logic p_n;  // active low: 0 when x1 > x2

  gt_comparator #(.W(W)) u_cmp (.a(x1), .b(x2), .p_n(p_n));

  always_comb begin
    y1 = p_n ? x1 : x2;  // M1
    y2 = p_n ? x2 : x1;  // M2
  end

endmodule
