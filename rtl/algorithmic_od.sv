// Algorithmic (single-cycle) even-odd sorting device.
//
// A direct mapping of the even-odd flow graph into hardware: N tiers of
// compare-and-rearrange units, even and odd tiers alternating, N(N-1)/2
// units in all, with no registers anywhere. d_out is d_in sorted
// descending (d_out[0] largest) after the combinational delay of N
// comparator-plus-multiplexer levels. The structure follows the source
// design; N = 16 numbers of W = 8 bits is its synthesis configuration.
module algorithmic_od #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d_in  [N],
  output logic [W-1:0] d_out [N]
);

  for (genvar t = 0; t < N; t++) begin : g_tier
    logic [W-1:0] q [N];  // lanes after tier t
    if (t == 0) begin : g_first
      oe_tier #(.N(N), .W(W), .ODD(1'b0)) u_tier (.d(d_in), .q(q));
    end else begin : g_next
      oe_tier #(.N(N), .W(W), .ODD(t % 2 == 1)) u_tier (
        .d(g_tier[t-1].q), .q(q)
      );
    end
  end

  assign d_out = g_tier[N-1].q;

endmodule
