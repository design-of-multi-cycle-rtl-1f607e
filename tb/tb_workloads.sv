// Workload testbench: the whole set of six devices at the two other sizes
// the sorters are evaluated at, next to the default 16 x 8-bit one:
//  * N = 6 numbers of 8 bits, starting with the example array
//    45 32 67 09 47 78 (hex), which every device must turn into
//    78 67 47 45 32 09;
//  * N = 8 numbers of 4 bits, the size of the worked complexity examples.
// Each instance is driven by top_exerciser, which checks results,
// latencies and mechanisms.
module tb_workloads;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // N = 6, W = 8
  logic       a_rst;
  logic [7:0] a_alg_in [6], a_alg_out [6];
  logic       a_cv_in_valid, a_cv_out_valid;
  logic [7:0] a_cv_in [6], a_cv_out [6];
  logic       a_cmb_start, a_cmb_busy, a_cmb_done;
  logic [7:0] a_cmb_in [6], a_cmb_out [6];
  logic [5:0] a_cmb_sel_mux, a_cmb_sel_demux;
  logic       a_it_start, a_it_busy, a_it_done;
  logic [7:0] a_it_in [6], a_it_out [6];
  logic       a_si_start, a_si_busy, a_si_done;
  logic [7:0] a_si_in [6], a_si_out [6];
  logic       a_sq_start, a_sq_busy, a_sq_done;
  logic [7:0] a_sq_in [6], a_sq_out [6];
  int         a_checks, a_failures;
  logic       a_finished;

  // N = 8, W = 4
  logic       b_rst;
  logic [3:0] b_alg_in [8], b_alg_out [8];
  logic       b_cv_in_valid, b_cv_out_valid;
  logic [3:0] b_cv_in [8], b_cv_out [8];
  logic       b_cmb_start, b_cmb_busy, b_cmb_done;
  logic [3:0] b_cmb_in [8], b_cmb_out [8];
  logic [7:0] b_cmb_sel_mux, b_cmb_sel_demux;
  logic       b_it_start, b_it_busy, b_it_done;
  logic [3:0] b_it_in [8], b_it_out [8];
  logic       b_si_start, b_si_busy, b_si_done;
  logic [3:0] b_si_in [8], b_si_out [8];
  logic       b_sq_start, b_sq_busy, b_sq_done;
  logic [3:0] b_sq_in [8], b_sq_out [8];
  int         b_checks, b_failures;
  logic       b_finished;

  sorting_devices_top #(.N(6), .W(8)) u_a (
    .clk, .rst(a_rst),
    .alg_in(a_alg_in), .alg_out(a_alg_out),
    .cv_in_valid(a_cv_in_valid), .cv_in(a_cv_in), .cv_out_valid(a_cv_out_valid), .cv_out(a_cv_out),
    .cmb_start(a_cmb_start), .cmb_in(a_cmb_in), .cmb_out(a_cmb_out), .cmb_busy(a_cmb_busy),
    .cmb_done(a_cmb_done), .cmb_sel_mux(a_cmb_sel_mux), .cmb_sel_demux(a_cmb_sel_demux),
    .it_start(a_it_start), .it_in(a_it_in), .it_out(a_it_out), .it_busy(a_it_busy), .it_done(a_it_done),
    .si_start(a_si_start), .si_in(a_si_in), .si_out(a_si_out), .si_busy(a_si_busy), .si_done(a_si_done),
    .sq_start(a_sq_start), .sq_in(a_sq_in), .sq_out(a_sq_out), .sq_busy(a_sq_busy), .sq_done(a_sq_done)
  );

  top_exerciser #(.N(6), .W(8), .NARR(60)) u_ex_a (
    .clk, .rst(a_rst),
    .alg_in(a_alg_in), .alg_out(a_alg_out),
    .cv_in_valid(a_cv_in_valid), .cv_in(a_cv_in), .cv_out_valid(a_cv_out_valid), .cv_out(a_cv_out),
    .cmb_start(a_cmb_start), .cmb_in(a_cmb_in), .cmb_out(a_cmb_out), .cmb_busy(a_cmb_busy),
    .cmb_done(a_cmb_done), .cmb_sel_mux(a_cmb_sel_mux), .cmb_sel_demux(a_cmb_sel_demux),
    .it_start(a_it_start), .it_in(a_it_in), .it_out(a_it_out), .it_busy(a_it_busy), .it_done(a_it_done),
    .si_start(a_si_start), .si_in(a_si_in), .si_out(a_si_out), .si_busy(a_si_busy), .si_done(a_si_done),
    .sq_start(a_sq_start), .sq_in(a_sq_in), .sq_out(a_sq_out), .sq_busy(a_sq_busy), .sq_done(a_sq_done),
    .checks(a_checks), .failures(a_failures), .finished(a_finished)
  );

  sorting_devices_top #(.N(8), .W(4)) u_b (
    .clk, .rst(b_rst),
    .alg_in(b_alg_in), .alg_out(b_alg_out),
    .cv_in_valid(b_cv_in_valid), .cv_in(b_cv_in), .cv_out_valid(b_cv_out_valid), .cv_out(b_cv_out),
    .cmb_start(b_cmb_start), .cmb_in(b_cmb_in), .cmb_out(b_cmb_out), .cmb_busy(b_cmb_busy),
    .cmb_done(b_cmb_done), .cmb_sel_mux(b_cmb_sel_mux), .cmb_sel_demux(b_cmb_sel_demux),
    .it_start(b_it_start), .it_in(b_it_in), .it_out(b_it_out), .it_busy(b_it_busy), .it_done(b_it_done),
    .si_start(b_si_start), .si_in(b_si_in), .si_out(b_si_out), .si_busy(b_si_busy), .si_done(b_si_done),
    .sq_start(b_sq_start), .sq_in(b_sq_in), .sq_out(b_sq_out), .sq_busy(b_sq_busy), .sq_done(b_sq_done)
  );

  top_exerciser #(.N(8), .W(4), .NARR(60)) u_ex_b (
    .clk, .rst(b_rst),
    .alg_in(b_alg_in), .alg_out(b_alg_out),
    .cv_in_valid(b_cv_in_valid), .cv_in(b_cv_in), .cv_out_valid(b_cv_out_valid), .cv_out(b_cv_out),
    .cmb_start(b_cmb_start), .cmb_in(b_cmb_in), .cmb_out(b_cmb_out), .cmb_busy(b_cmb_busy),
    .cmb_done(b_cmb_done), .cmb_sel_mux(b_cmb_sel_mux), .cmb_sel_demux(b_cmb_sel_demux),
    .it_start(b_it_start), .it_in(b_it_in), .it_out(b_it_out), .it_busy(b_it_busy), .it_done(b_it_done),
    .si_start(b_si_start), .si_in(b_si_in), .si_out(b_si_out), .si_busy(b_si_busy), .si_done(b_si_done),
    .sq_start(b_sq_start), .sq_in(b_sq_in), .sq_out(b_sq_out), .sq_busy(b_sq_busy), .sq_done(b_sq_done),
    .checks(b_checks), .failures(b_failures), .finished(b_finished)
  );

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (a_finished === 1'b1 && b_finished === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures);
    $finish;
  end

endmodule
