// The six even-odd sorting devices side by side.
//
// The library offers one sorting function, descending order of N unsigned
// W-bit numbers, in six structures that trade hardware for time:
//   alg_*  algorithmic device: N(N-1)/2 units, combinational, no clock
//   cv_*   conveyor device: the same units with N+1 register banks,
//          one array per clock, latency N clocks
//   cmb_*  combined multi-cycle device: N-1 units, N/2 iterations
//   it_*   iterative multi-cycle device: 1 unit, N(N-1)/2 iterations
//   si_*   sequential-iterative multi-cycle device: N/2 units, N iterations
//   sq_*   sequential multi-cycle device: N units, one per tier, 2N-2 steps
// Each device has its own data, control and result ports so that they can
// be used, or compared, independently; only clk and rst are shared. The
// multi-cycle devices take an array with a start pulse, raise busy while
// they work and pulse done when d_out holds the result. The selection of
// structures and the N = 16, W = 8 configuration follow the source design;
// putting all six in one top is only a convenience for comparing them.
module sorting_devices_top #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  // algorithmic device
  input  logic [W-1:0] alg_in  [N],
  output logic [W-1:0] alg_out [N],
  // conveyor device
  input  logic         cv_in_valid,
  input  logic [W-1:0] cv_in   [N],
  output logic         cv_out_valid,
  output logic [W-1:0] cv_out  [N],
  // combined multi-cycle device
  input  logic         cmb_start,
  input  logic [W-1:0] cmb_in  [N],
  output logic [W-1:0] cmb_out [N],
  output logic         cmb_busy,
  output logic         cmb_done,
  output logic [N-1:0] cmb_sel_mux,
  output logic [N-1:0] cmb_sel_demux,
  // iterative multi-cycle device
  input  logic         it_start,
  input  logic [W-1:0] it_in   [N],
  output logic [W-1:0] it_out  [N],
  output logic         it_busy,
  output logic         it_done,
  // sequential-iterative multi-cycle device
  input  logic         si_start,
  input  logic [W-1:0] si_in   [N],
  output logic [W-1:0] si_out  [N],
  output logic         si_busy,
  output logic         si_done,
  // sequential multi-cycle device
  input  logic         sq_start,
  input  logic [W-1:0] sq_in   [N],
  output logic [W-1:0] sq_out  [N],
  output logic         sq_busy,
  output logic         sq_done
);

  algorithmic_od #(.N(N), .W(W)) u_alg (.d_in(alg_in), .d_out(alg_out));

  conveyor_od #(.N(N), .W(W)) u_cv (
    .clk, .rst, .in_valid(cv_in_valid), .d_in(cv_in),
    .out_valid(cv_out_valid), .d_out(cv_out)
  );

  combined_mod #(.N(N), .W(W)) u_cmb (
    .clk, .rst, .start(cmb_start), .d_in(cmb_in), .d_out(cmb_out),
    .busy(cmb_busy), .done(cmb_done),
    .sel_mux(cmb_sel_mux), .sel_demux(cmb_sel_demux)
  );

  iterative_mod #(.N(N), .W(W)) u_it (
    .clk, .rst, .start(it_start), .d_in(it_in), .d_out(it_out),
    .busy(it_busy), .done(it_done)
  );

  seq_iter_mod #(.N(N), .W(W)) u_si (
    .clk, .rst, .start(si_start), .d_in(si_in), .d_out(si_out),
    .busy(si_busy), .done(si_done)
  );

  sequential_mod #(.N(N), .W(W)) u_sq (
    .clk, .rst, .start(sq_start), .d_in(sq_in), .d_out(sq_out),
    .busy(sq_busy), .done(sq_done)
  );

endmodule
