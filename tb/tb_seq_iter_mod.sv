// Self-checking testbench for seq_iter_mod, the sequential-iterative multi-cycle sorter.
// Two instances are tested: N = 6, W = 8 with the published six-number
// example, and the default N = 16, W = 8. For each, mod_driver checks the
// sorted result against an insertion-sort reference, the latency of
// N rising edges from start to done, the busy/done handshake, reset,
// and that a start given while busy is ignored.
module tb_seq_iter_mod;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NA = 6;
  localparam int NB = 16;
  localparam int LA = lat(NA);
  localparam int LB = lat(NB);

  function automatic int lat(int N);
    return N;
  endfunction

  logic         rst_a, start_a, busy_a, done_a, fin_a;
  logic [7:0]   din_a [NA], dout_a [NA];
  int           chk_a, fail_a, bs_a;
  logic         rst_b, start_b, busy_b, done_b, fin_b;
  logic [7:0]   din_b [NB], dout_b [NB];
  int           chk_b, fail_b, bs_b;
  int           checks, failures;

  seq_iter_mod #(.N(NA), .W(8)) u_a (
    .clk, .rst(rst_a), .start(start_a), .d_in(din_a), .d_out(dout_a),
    .busy(busy_a), .done(done_a)
  );
  mod_driver #(.N(NA), .W(8), .LAT(LA), .NTEST(60)) u_drv_a (
    .clk, .rst(rst_a), .start(start_a), .d_in(din_a), .d_out(dout_a),
    .busy(busy_a), .done(done_a), .checks(chk_a), .failures(fail_a),
    .busy_starts(bs_a), .finished(fin_a)
  );

  seq_iter_mod u_b (
    .clk, .rst(rst_b), .start(start_b), .d_in(din_b), .d_out(dout_b),
    .busy(busy_b), .done(done_b)
  );
  mod_driver #(.N(NB), .W(8), .LAT(LB), .NTEST(200)) u_drv_b (
    .clk, .rst(rst_b), .start(start_b), .d_in(din_b), .d_out(dout_b),
    .busy(busy_b), .done(done_b), .checks(chk_b), .failures(fail_b),
    .busy_starts(bs_b), .finished(fin_b)
  );

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (fin_a === 1'b1 && fin_b === 1'b1);
    checks   = chk_a + chk_b + 1;
    failures = fail_a + fail_b;
    if (bs_a == 0 || bs_b == 0) begin
      failures++;
      $display("no start was given while busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
