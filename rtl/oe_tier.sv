// One tier of the even-odd flow graph: a row of compare-and-rearrange
// units working side by side on disjoint lane pairs.
//
// With ODD = 0 the pairs are (0,1), (2,3), ... (N/2 units); with ODD = 1
// they are (1,2), (3,4), ... (N/2-1 units) and lanes 0 and N-1 pass
// through. In each pair the larger number goes to the upper lane (lower
// index), so the tiers together sort descending. Combinational. The tier
// structure is that of the even-odd flow graph; the descending lane order
// is this design's choice, matching the order of the reference example.
module oe_tier #(
  parameter int unsigned N   = 16,
  parameter int unsigned W   = 8,
  parameter bit          ODD = 1'b0
) (
  input  logic [W-1:0] d [N],
  output logic [W-1:0] q [N]
);

  localparam int unsigned OPS = ODD ? N / 2 - 1 : N / 2;

  for (genvar k = 0; k < OPS; k++) begin : g_unit
    localparam int unsigned L = 2 * k + (ODD ? 1 : 0);
    compare_exchange #(.W(W)) u_ce (
      .x1(d[L]), .x2(d[L+1]), .y1(q[L+1]), .y2(q[L])
    );
  end

  if (ODD) begin : g_pass
    assign q[0]   = d[0];
    assign q[N-1] = d[N-1];
  end

endmodule
