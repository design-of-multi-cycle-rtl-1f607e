// Sequential-iterative-type multi-cycle even-odd sorting device (MOD).
//
// N/2 operational units perform one tier of the flow graph per clock.
// Operand multiplexers in front of unit j select lanes (2j, 2j+1) in an
// even tier and (2j+1, 2j+2) in an odd tier; the last unit is idle in odd
// tiers. Lane multiplexers take the input registers in the first tier and
// the intermediate delay registers afterwards; after the last tier the
// array goes to the output registers. The number of units (N/2) follows
// the source design. The source counts k3 = N(N-1)/2 / (N/2) = N-1
// iterations; an even-odd sort needs N dependent tiers, so without chaining
// two tiers in one clock this device takes N iterations.
//
// Timing: the edge that samples start loads the input registers; the N
// tiers take the next N edges (16 for N = 16); done is high for one cycle
// right after the last of them. d_out is sorted descending and held. A start while busy is
// ignored; rst is synchronous and clears all registers.
module seq_iter_mod
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

  localparam int unsigned U  = N / 2;
  localparam int unsigned TW = $clog2(N);

  run_state_e    state_q;
  logic [TW-1:0] tier_q;
  logic          odd;
  logic [W-1:0]  in_q   [N];
  logic [W-1:0]  work_q [N];
  logic [W-1:0]  out_q  [N];
  logic [W-1:0]  src    [N];
  logic [W-1:0]  work_d [N];
  logic [W-1:0]  opa [U], opb [U], rmin [U], rmax [U];

  assign odd = tier_q[0];

  always_comb begin
    for (int i = 0; i < N; i++)
      src[i] = (tier_q == '0) ? in_q[i] : work_q[i];
    for (int j = 0; j < U; j++) begin
      if (!odd) begin
        opa[j] = src[2*j];
        opb[j] = src[2*j+1];
      end else begin
        opa[j] = src[(2*j+1) % N];
        opb[j] = src[(2*j+2) % N];
      end
    end
  end

  always_comb begin
    work_d = src;
    for (int j = 0; j < U; j++) begin
      if (!odd) begin
        work_d[2*j]   = rmax[j];
        work_d[2*j+1] = rmin[j];
      end else if (j < U - 1) begin
        work_d[2*j+1] = rmax[j];
        work_d[2*j+2] = rmin[j];
      end
    end
  end

  for (genvar j = 0; j < U; j++) begin : g_unit
    compare_exchange #(.W(W)) u_ce (
      .x1(opa[j]), .x2(opb[j]), .y1(rmin[j]), .y2(rmax[j])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      tier_q  <= '0;
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
          state_q <= S_RUN;
        end
        S_RUN: begin
          work_q <= work_d;
          tier_q <= tier_q + 1'b1;
          if (tier_q == TW'(N - 1)) begin
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

  // Handshake rules: done only after a run, never together with busy.
  a_done_not_busy: assert property (@(posedge clk) disable iff (rst) done |-> !busy)
    else $error("done and busy high together");
  a_done_after_run: assert property (@(posedge clk) disable iff (rst) done |-> $past(busy))
    else $error("done without a preceding run");

endmodule
