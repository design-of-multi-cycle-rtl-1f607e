// Conveyor (pipeline) even-odd sorting device.
//
// The algorithmic sorter with a register bank in front of the first tier
// (input registers) and one after every tier; the bank after the last tier
// is the output register. That is N+1 banks of N numbers, N(N+1) registers
// in all, as in the source design. A new array may enter on every clock.
//
// Timing: an array presented with in_valid high at a rising edge is caught
// by the input registers there and appears on d_out, with out_valid high,
// after the N-th rising edge that follows (N tier registers). rst is synchronous and
// clears every register, data included. The valid flag travelling with the
// data is this design's own addition, so the user can tell filled stages.
module conveyor_od #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] d_in  [N],
  output logic         out_valid,
  output logic [W-1:0] d_out [N]
);

  logic [W-1:0] stage_q [N+1][N];  // [0] input registers, [N] output registers
  logic [W-1:0] tier_q  [N][N];    // combinational output of each tier
  logic [N:0]   valid_q;

  for (genvar t = 0; t < N; t++) begin : g_tier
    oe_tier #(.N(N), .W(W), .ODD(t % 2 == 1)) u_tier (
      .d(stage_q[t]), .q(tier_q[t])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
      for (int s = 0; s <= N; s++)
        for (int i = 0; i < N; i++)
          stage_q[s][i] <= '0;
    end else begin
      valid_q    <= {valid_q[N-1:0], in_valid};
      stage_q[0] <= d_in;
      for (int t = 0; t < N; t++)
        stage_q[t+1] <= tier_q[t];
    end
  end

  assign out_valid = valid_q[N];
  assign d_out     = stage_q[N];

endmodule
