// End-to-end testbench for sorting_devices_top at its default size
// (N = 16 numbers of W = 8 bits, no parameter overrides on the top).
// top_exerciser sends 40 arrays through all six devices at once, checks
// every result and latency, and requires each mechanism of the structures
// to occur (see top_exerciser for the list).
module tb_sorting_devices_top;

  localparam int N = 16;
  localparam int W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst;
  logic [W-1:0] alg_in [N], alg_out [N];
  logic         cv_in_valid, cv_out_valid;
  logic [W-1:0] cv_in [N], cv_out [N];
  logic         cmb_start, cmb_busy, cmb_done;
  logic [W-1:0] cmb_in [N], cmb_out [N];
  logic [N-1:0] cmb_sel_mux, cmb_sel_demux;
  logic         it_start, it_busy, it_done;
  logic [W-1:0] it_in [N], it_out [N];
  logic         si_start, si_busy, si_done;
  logic [W-1:0] si_in [N], si_out [N];
  logic         sq_start, sq_busy, sq_done;
  logic [W-1:0] sq_in [N], sq_out [N];
  int           checks, failures;
  logic         finished;

  sorting_devices_top dut (.*);

  top_exerciser #(.N(N), .W(W), .NARR(40)) u_ex (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (finished === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
