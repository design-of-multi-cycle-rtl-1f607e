// Iterative-type multi-cycle even-odd sorting device (MOD).
//
// All N(N-1)/2 compare-and-rearrange operations of the sort are folded onto
// a single operational unit, one operation per clock. A small controller
// walks the flow graph tier by tier and, inside a tier, pair by pair; two
// operand multiplexers pick the pair's lanes, from the input registers in
// the first tier and from the intermediate delay registers afterwards, and
// two demultiplexers write the unit's outputs back to those lanes. On the
// last operation the complete array is written to the output registers.
// The single unit, the register files and the k2 = N(N-1)/2 iteration count
// follow the source design; the way the selects are generated (a tier
// counter and a pair counter) is this design's own.
//
// Timing: the edge that samples start loads the input registers; the
// operations take the next N(N-1)/2 edges (120 for N = 16); done is high
// for one cycle right after the last of them. d_out is sorted
// descending and held until the next result. A start while busy is
// ignored; rst is synchronous and clears all registers.
module iterative_mod
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

  localparam int unsigned TW = $clog2(N);
  localparam int unsigned KW = $clog2(N / 2);

  run_state_e   state_q;
  logic [TW-1:0] tier_q;
  logic [KW-1:0] pair_q;
  logic [W-1:0]  in_q   [N];
  logic [W-1:0]  work_q [N];
  logic [W-1:0]  out_q  [N];
  logic [W-1:0]  work_d [N];
  logic [W-1:0]  opa, opb, res_min, res_max;
  logic [TW-1:0] lane;
  logic          last_pair, last_op;

  always_comb begin
    lane      = TW'(pair_lane(int'(tier_q), int'(pair_q)));
    last_pair = (int'(pair_q) == tier_ops(N, int'(tier_q)) - 1);
    last_op   = last_pair && (tier_q == TW'(N - 1));
  end

  // operand multiplexers
  always_comb begin
    opa = (tier_q == '0) ? in_q[lane]      : work_q[lane];
    opb = (tier_q == '0) ? in_q[lane + 1'b1] : work_q[lane + 1'b1];
  end

  // demultiplexers back into the delay registers
  always_comb begin
    work_d = work_q;
    work_d[lane]        = res_max;
    work_d[lane + 1'b1] = res_min;
  end

  compare_exchange #(.W(W)) u_unit (
    .x1(opa), .x2(opb), .y1(res_min), .y2(res_max)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      tier_q  <= '0;
      pair_q  <= '0;
      done    <= 1'b0;
      for (int i = 0; i < N; i++) begin
        in_q[i]   <= '0;
        work_q[i] <= '0;
        out_q[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          in_q    <= d_in;
          tier_q  <= '0;
          pair_q  <= '0;
          state_q <= S_RUN;
        end
        S_RUN: begin
          work_q <= work_d;
          if (last_op) begin
            out_q   <= work_d;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else if (last_pair) begin
            tier_q <= tier_q + 1'b1;
            pair_q <= '0;
          end else begin
            pair_q <= pair_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state_q == S_RUN);
  assign d_out = out_q;

  // Handshake rules: done only after a run, never together with busy.
  a_done_not_busy: assert property (@(posedge clk) disable iff (rst) done |-> !busy)
    else $error("done and busy high together");
  a_done_after_run: assert property (@(posedge clk) disable iff (rst) done |-> $past(busy))
    else $error("done without a preceding run");

endmodule
