// Stimulus and checking for one multi-cycle sorter (start/busy/done
// handshake), shared by the testbenches of the multi-cycle devices.
//
// After reset it checks that d_out is cleared and done/busy are low. Then,
// for NTEST arrays (the published six-number example first when N = 6,
// then fixed patterns and random arrays), it pulses start, checks that busy
// stays high and done stays low until the result, that done comes exactly
// LAT rising edges after the edge that sampled start, that d_out equals an
// insertion-sort reference, and that d_out holds the result afterwards.
// Every third array a second start with different data is given while the
// device is busy; it must be ignored. finished rises when all is done.
module mod_driver
  import tb_sort_pkg::*;
#(
  parameter int N     = 16,
  parameter int W     = 8,
  parameter int LAT   = 9,
  parameter int NTEST = 200
) (
  input  logic         clk,
  output logic         rst,
  output logic         start,
  output logic [W-1:0] d_in [N],
  input  logic [W-1:0] d_out [N],
  input  logic         busy,
  input  logic         done,
  output int           checks,
  output int           failures,
  output int           busy_starts,
  output logic         finished
);

  task automatic expect_true(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("[N=%0d] %s", N, msg);
    end
  endtask

  initial begin
    vec_t v, e;
    int lat;
    checks = 0; failures = 0; busy_starts = 0; finished = 1'b0;
    rst = 1'b1; start = 1'b0;
    foreach (d_in[i]) d_in[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    begin
      bit zero;
      zero = 1'b1;
      foreach (d_out[i]) if (d_out[i] != '0) zero = 1'b0;
      expect_true(zero && !busy && !done, "outputs not cleared by reset");
    end
    for (int n = 0; n < NTEST; n++) begin
      if (n == 0 && N == 6) v = '{'h45, 'h32, 'h67, 'h09, 'h47, 'h78};
      else v = make_vector(N, W, (n < 12) ? n % 6 : 0);
      e = ref_sort_desc(v);
      foreach (d_in[i]) d_in[i] = W'(v[i]);
      start = 1'b1;
      @(posedge clk);            // start sampled here
      #1 start = 1'b0;
      foreach (d_in[i]) d_in[i] = W'($urandom);  // inputs may change now
      lat = 1;
      while (!done && lat < LAT + 50) begin
        expect_true(busy, "busy low before done");
        if (n % 3 == 1 && lat == 2) begin
          start = 1'b1;          // must be ignored while busy
          busy_starts++;
        end
        @(posedge clk);
        #1 start = 1'b0;
        lat++;
      end
      lat--;
      expect_true(lat == LAT, $sformatf("latency %0d edges, expected %0d", lat, LAT));
      for (int i = 0; i < N; i++)
        expect_true(int'(d_out[i]) == e[i],
                    $sformatf("array %0d lane %0d: got %0h expected %0h", n, i, d_out[i], e[i]));
      @(posedge clk);
      #1;
      expect_true(!done && !busy, "done longer than one cycle or busy after done");
      begin
        bit held;
        held = 1'b1;
        for (int i = 0; i < N; i++) if (int'(d_out[i]) != e[i]) held = 1'b0;
        expect_true(held, "result not held");
      end
    end
    finished = 1'b1;
  end

endmodule
