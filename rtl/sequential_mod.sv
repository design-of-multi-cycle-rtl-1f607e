// Sequential-type multi-cycle even-odd sorting device (MOD).
//
// One operational unit per tier of the flow graph, N units in all. Each
// unit performs the operations of its own tier one after another: a pair
// counter drives two N/2-input operand multiplexers that pick the lanes of
// the current pair, and demultiplexers write the two results back to those
// lanes of a shared bank of intermediate delay registers. The units run at
// the same time on different parts of the array: unit t takes its next
// pair as soon as unit t-1 has finished both operations that pair depends
// on, so the tiers sweep across the array as overlapping waves. The first
// unit reads the input registers, the others the delay registers; when the
// last operation is done the array goes to the output registers. The unit
// count and the N/2-input multiplexers follow the source design; the
// dependency rule that lets the tiers overlap is this design's own reading
// of how the units are sequenced.
//
// Schedule (tiers t from 0, pairs k from 0): unit 0 does pair k in cycle k;
// an odd tier 2m+1 does pair k in cycle k+3m+2, an even tier 2m (m>=1) in
// cycle k+3m. Cycles count from 0 at the first edge after the edge that
// sampled start; the last operation is in cycle 2N-3, so done is high right
// after the (2N-2)-th such edge (30 for N = 16).
// d_out is sorted descending and held. A start while busy is ignored; rst
// is synchronous and clears all registers. N must be even and at least 4.
module sequential_mod
  import sort_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] d_in  [N],
  output logic [W-1:0] d_out [N],
  output logic         busy,
  output logic         done
);

  localparam int unsigned CW = $clog2(N / 2 + 1);
  localparam int unsigned LW = $clog2(N);

  run_state_e   state_q;
  logic [CW-1:0] cnt_q [N];   // operations completed by each unit
  logic [CW-1:0] cnt_d [N];
  logic [N-1:0]  fire;
  logic          finished;
  logic [W-1:0]  in_q   [N];
  logic [W-1:0]  work_q [N];
  logic [W-1:0]  out_q  [N];
  logic [W-1:0]  work_d [N];
  logic [W-1:0]  opa [N], opb [N], rmin [N], rmax [N];
  logic [LW-1:0] lane [N];   // upper lane of each unit's current pair

  always_comb begin
    for (int t = 0; t < N; t++) begin
      int unsigned k, need, ksel;
      k       = int'(cnt_q[t]);
      ksel    = (k < tier_ops(N, t)) ? k : tier_ops(N, t) - 1;  // in range once done
      lane[t] = LW'(pair_lane(t, ksel));
      if (t == 0)          need = 0;
      else if (t % 2 == 1) need = k + 2;
      else                 need = (k + 1 < N / 2 - 1) ? k + 1 : N / 2 - 1;
      fire[t] = (state_q == S_RUN) && (k < tier_ops(N, t)) &&
                ((t == 0) || (int'(cnt_q[t-1]) >= need));
      // N/2-input operand multiplexers
      opa[t] = (t == 0) ? in_q[lane[t]]     : work_q[lane[t]];
      opb[t] = (t == 0) ? in_q[lane[t] + 1'b1] : work_q[lane[t] + 1'b1];
      cnt_d[t] = cnt_q[t] + CW'(fire[t]);
    end
    finished = 1'b1;
    for (int t = 0; t < N; t++)
      if (int'(cnt_d[t]) != tier_ops(N, t)) finished = 1'b0;
  end

  always_comb begin
    // demultiplexers: firing units always touch disjoint lanes
    work_d = work_q;
    for (int t = 0; t < N; t++)
      if (fire[t]) begin
        work_d[lane[t]]     = rmax[t];
        work_d[lane[t] + 1'b1] = rmin[t];
      end
  end

  for (genvar t = 0; t < N; t++) begin : g_unit
    compare_exchange #(.W(W)) u_ce (
      .x1(opa[t]), .x2(opb[t]), .y1(rmin[t]), .y2(rmax[t])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
      for (int i = 0; i < N; i++) begin
        cnt_q[i]  <= '0;
        in_q[i]   <= '0;
        work_q[i] <= '0;
        out_q[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          in_q    <= d_in;
          for (int t = 0; t < N; t++) cnt_q[t] <= '0;
          state_q <= S_RUN;
        end
        S_RUN: begin
          work_q <= work_d;
          cnt_q  <= cnt_d;
          if (finished) begin
            out_q   <= work_d;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state_q == S_RUN);
  assign d_out = out_q;

  // Two units must never write the same lane in one cycle.
  always_ff @(posedge clk)
    if (!rst && state_q == S_RUN)
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          assert (!(fire[a] && fire[b] &&
                    (lane[a] == lane[b] || lane[a] == lane[b] + 1'b1 || lane[a] + 1'b1 == lane[b])))
            else $error("units %0d and %0d write overlapping lanes", a, b);

  // Handshake rules: done only after a run, never together with busy.
  a_done_not_busy: assert property (@(posedge clk) disable iff (rst) done |-> !busy)
    else $error("done and busy high together");
  a_done_after_run: assert property (@(posedge clk) disable iff (rst) done |-> $past(busy))
    else $error("done without a preceding run");

endmodule
