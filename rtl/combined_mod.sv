// Combined-type multi-cycle even-odd sorting device (MOD).
//
// The flow graph of the even-odd sort repeats one pattern N/2 times: an even
// tier of N/2 compare-and-rearrange units followed by an odd tier of N/2-1.
// This device builds that pattern once, N-1 units in two chained rows, and
// runs every array through it K = N/2 times. Around it sit:
//   * input registers, loaded from d_in when start is accepted;
//   * 2:1 multiplexers M1..MN, choosing per lane the input register
//     (first iteration) or the intermediate delay register (later ones);
//   * 1:2 demultiplexers Dm1..DmN, sending each iteration's results to the
//     intermediate delay registers or, in the last iteration, to the output
//     registers;
//   * the control device (combined_ctrl) driving all selects.
// These parts and their counts follow the source design.
//
// Timing: the edge that samples start loads the input registers; the K
// iterations take the next K edges; done is high right after the last of
// them. Counting the cycle in which start is given as the first, the result
// is ready in cycle K+1 (cycle 4 for N = 6, as in the published simulation;
// cycle 9 for N = 16). d_out holds the result,
// sorted descending (d_out[0] largest), until the next array finishes.
// rst is synchronous and clears all registers. The start/done handshake is
// this design's own choice. The select signals are brought out, as in the
// source block diagram, for observation.
module combined_mod #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] d_in  [N],
  output logic [W-1:0] d_out [N],
  output logic         busy,
  output logic         done,
  output logic [N-1:0] sel_mux,
  output logic [N-1:0] sel_demux
);

  logic         load_in, step_en;
  logic [W-1:0] in_q    [N];   // input registers
  logic [W-1:0] inter_q [N];   // intermediate result delay registers
  logic [W-1:0] out_q   [N];   // output registers
  logic [W-1:0] mux_out [N];
  logic [W-1:0] even_q  [N];
  logic [W-1:0] odd_q   [N];

  combined_ctrl #(.N(N)) u_ctrl (
    .clk, .rst, .start,
    .load_in, .step_en, .sel_mux, .sel_demux, .busy, .done
  );

  always_comb
    for (int i = 0; i < N; i++)
      mux_out[i] = sel_mux[i] ? inter_q[i] : in_q[i];

  oe_tier #(.N(N), .W(W), .ODD(1'b0)) u_even (.d(mux_out), .q(even_q));
  oe_tier #(.N(N), .W(W), .ODD(1'b1)) u_odd  (.d(even_q),  .q(odd_q));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin
        in_q[i]    <= '0;
        inter_q[i] <= '0;
        out_q[i]   <= '0;
      end
    end else begin
      if (load_in) in_q <= d_in;
      if (step_en)
        for (int i = 0; i < N; i++)
          if (sel_demux[i]) out_q[i]   <= odd_q[i];
          else              inter_q[i] <= odd_q[i];
    end
  end

  assign d_out = out_q;

endmodule
