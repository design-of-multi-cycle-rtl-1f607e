// Control device of the combined-type multi-cycle sorter.
//
// It sequences the K = N/2 iterations of the combined sorter. A start pulse
// in the idle state makes load_in high for that cycle, so the input
// registers take the new array on the same edge, and begins iteration 0 on
// the next cycle. During every iteration step_en is high; the multiplexer
// selects sel_mux are 0 in iteration 0 (take the input registers) and 1
// afterwards (take the intermediate registers); the demultiplexer selects
// sel_demux are 1 only in the last iteration (send the results to the
// output registers instead of the intermediate ones). done pulses for one
// cycle after the edge that fills the output registers: it is high right
// after the K-th edge that follows the edge which sampled start.
//
// The split of one select per lane follows the source design; all lanes
// share the same value because every lane takes the same path in a given
// iteration. A start while busy is ignored; rst is synchronous.
module combined_ctrl
  import sort_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic         load_in,
  output logic         step_en,
  output logic [N-1:0] sel_mux,
  output logic [N-1:0] sel_demux,
  output logic         busy,
  output logic         done
);

  localparam int unsigned K  = N / 2;             // iterations k1
  localparam int unsigned CW = $clog2(K + 1);

  run_state_e    state_q;
  logic [CW-1:0] iter_q;
  logic          last_iter;

  assign last_iter = (iter_q == CW'(K - 1));
  assign load_in   = (state_q == S_IDLE) && start;
  assign step_en   = (state_q == S_RUN);
  assign busy      = (state_q == S_RUN);
  assign sel_mux   = {N{step_en && (iter_q != '0)}};
  assign sel_demux = {N{step_en && last_iter}};

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      iter_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_RUN;
          iter_q  <= '0;
        end
        S_RUN: begin
          if (last_iter) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
          iter_q <= iter_q + 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: done only after a run, never together with busy.
  a_done_not_busy: assert property (@(posedge clk) disable iff (rst) done |-> !busy)
    else $error("done and busy high together");
  a_done_after_run: assert property (@(posedge clk) disable iff (rst) done |-> $past(busy))
    else $error("done without a preceding run");

endmodule
