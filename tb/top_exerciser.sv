// Stimulus and checking for the whole sorting_devices_top, shared by the
// end-to-end testbenches. It drives every port of the top and reads every
// output, so the top can be instantiated with or without parameters.
//
// Test arrays go to all six devices at once, a different one to each
// multi-cycle device so that crossed connections show up; when N = 6 the
// first array is the six-number example 45 32 67 09 47 78 (hex) for every
// device. The algorithmic device is checked combinationally; the conveyor
// device gets its array inside a burst of random arrays streamed one per
// clock, so its pipeline runs full; the four multi-cycle devices get a
// start pulse, and for every third array a second start with other data
// while they are busy. Each result is compared with an insertion-sort
// reference and each latency with the device's schedule: N clocks
// (conveyor), N/2 (combined), N(N-1)/2 (iterative), N (sequential-
// iterative) and 2N-2 (sequential) edges after the edge that took the
// array. The mechanisms are counted and each must occur: a full conveyor
// pipeline, the combined device's multiplexers switching to the
// intermediate registers and its demultiplexers to the output registers,
// starts ignored while busy, and sequential-device runs shorter than
// N(N-1)/2 clocks, which can only happen when several tier units work in
// the same cycle.
module top_exerciser
  import tb_sort_pkg::*;
#(
  parameter int N    = 16,
  parameter int W    = 8,
  parameter int NARR = 40
) (
  input  logic         clk,
  output logic         rst,
  output logic [W-1:0] alg_in [N],
  input  logic [W-1:0] alg_out [N],
  output logic         cv_in_valid,
  output logic [W-1:0] cv_in [N],
  input  logic         cv_out_valid,
  input  logic [W-1:0] cv_out [N],
  output logic         cmb_start,
  output logic [W-1:0] cmb_in [N],
  input  logic [W-1:0] cmb_out [N],
  input  logic         cmb_busy,
  input  logic         cmb_done,
  input  logic [N-1:0] cmb_sel_mux,
  input  logic [N-1:0] cmb_sel_demux,
  output logic         it_start,
  output logic [W-1:0] it_in [N],
  input  logic [W-1:0] it_out [N],
  input  logic         it_busy,
  input  logic         it_done,
  output logic         si_start,
  output logic [W-1:0] si_in [N],
  input  logic [W-1:0] si_out [N],
  input  logic         si_busy,
  input  logic         si_done,
  output logic         sq_start,
  output logic [W-1:0] sq_in [N],
  input  logic [W-1:0] sq_out [N],
  input  logic         sq_busy,
  input  logic         sq_done,
  output int           checks,
  output int           failures,
  output logic         finished
);

  // mechanism counters
  int n_pipe_full = 0, n_mux_inter = 0, n_demux_out = 0;
  int n_busy_start = 0, n_overlap = 0, n_alg = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (&cmb_sel_mux)   n_mux_inter++;
      if (&cmb_sel_demux) n_demux_out++;
    end
  end

  task automatic expect_true(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("[N=%0d W=%0d] %0t: %s", N, W, $time, msg);
    end
  endtask

  function automatic bit same(vec_t e, logic [W-1:0] got [N]);
    for (int i = 0; i < N; i++) if (int'(got[i]) != e[i]) return 1'b0;
    return 1'b1;
  endfunction

  // One multi-cycle device: start, optional start while busy, wait, check.
  // which: 0 combined, 1 iterative, 2 sequential-iterative, 3 sequential
  task automatic run_mod(int which, vec_t v, bit poke);
    vec_t e = ref_sort_desc(v);
    int lat, exp_lat;
    string name;
    case (which)
      0: begin name = "combined";             exp_lat = N / 2; end
      1: begin name = "iterative";            exp_lat = N * (N - 1) / 2; end
      2: begin name = "sequential-iterative"; exp_lat = N; end
      default: begin name = "sequential";     exp_lat = 2 * N - 2; end
    endcase
    for (int i = 0; i < N; i++)
      case (which)
        0: cmb_in[i] = W'(v[i]);
        1: it_in[i]  = W'(v[i]);
        2: si_in[i]  = W'(v[i]);
        default: sq_in[i] = W'(v[i]);
      endcase
    case (which) 0: cmb_start = 1; 1: it_start = 1; 2: si_start = 1; default: sq_start = 1; endcase
    @(posedge clk);
    #1;
    case (which) 0: cmb_start = 0; 1: it_start = 0; 2: si_start = 0; default: sq_start = 0; endcase
    lat = 0;
    forever begin
      bit d, b;
      case (which)
        0: begin d = cmb_done; b = cmb_busy; end
        1: begin d = it_done;  b = it_busy;  end
        2: begin d = si_done;  b = si_busy;  end
        default: begin d = sq_done; b = sq_busy; end
      endcase
      if (d || lat > exp_lat + 5) break;
      if (poke && lat == 1) begin
        for (int i = 0; i < N; i++)
          case (which)
            0: cmb_in[i] = W'($urandom);
            1: it_in[i]  = W'($urandom);
            2: si_in[i]  = W'($urandom);
            default: sq_in[i] = W'($urandom);
          endcase
        case (which) 0: cmb_start = 1; 1: it_start = 1; 2: si_start = 1; default: sq_start = 1; endcase
        if (b) n_busy_start++;
      end
      @(posedge clk);
      #1;
      case (which) 0: cmb_start = 0; 1: it_start = 0; 2: si_start = 0; default: sq_start = 0; endcase
      lat++;
    end
    expect_true(lat == exp_lat, $sformatf("%s latency %0d, expected %0d", name, lat, exp_lat));
    if (which == 3 && lat < N * (N - 1) / 2) n_overlap++;
    case (which)
      0: expect_true(same(e, cmb_out), {name, " result wrong"});
      1: expect_true(same(e, it_out),  {name, " result wrong"});
      2: expect_true(same(e, si_out),  {name, " result wrong"});
      default: expect_true(same(e, sq_out), {name, " result wrong"});
    endcase
  endtask

  // Conveyor: the test array in the middle of a burst of 2N+1 arrays.
  task automatic run_cv(vec_t v);
    vec_t q [$];
    int t_in [$];
    int cyc = 0;
    int got = 0;
    bit prev = 0;
    for (int c = 0; c < 3 * N + 4; c++) begin
      if (c <= 2 * N) begin
        vec_t x = (c == N) ? v : make_vector(N, W, 0);
        cv_in_valid = 1'b1;
        foreach (cv_in[i]) cv_in[i] = W'(x[i]);
        q.push_back(ref_sort_desc(x));
        t_in.push_back(c);
      end else begin
        cv_in_valid = 1'b0;
      end
      @(posedge clk);
      #1;
      if (cv_out_valid) begin
        vec_t ex = q.pop_front();
        int   ti = t_in.pop_front();
        got++;
        expect_true(c - ti == N, $sformatf("conveyor latency %0d, expected %0d", c - ti, N));
        expect_true(same(ex, cv_out), "conveyor result wrong");
        if (prev) n_pipe_full++;
      end
      prev = cv_out_valid;
    end
    expect_true(got == 2 * N + 1 && q.size() == 0, $sformatf("conveyor gave %0d results", got));
  endtask

  initial begin
    vec_t v, v1, v2, v3;
    checks = 0; failures = 0; finished = 1'b0;
    rst = 1'b1;
    cv_in_valid = 0; cmb_start = 0; it_start = 0; si_start = 0; sq_start = 0;
    for (int i = 0; i < N; i++) begin
      alg_in[i] = '0; cv_in[i] = '0; cmb_in[i] = '0;
      it_in[i] = '0; si_in[i] = '0; sq_in[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NARR; n++) begin
      bit poke;
      poke = (n % 3 == 1);
      // a different array for each multi-cycle device, so that crossed
      // connections show up
      v  = make_vector(N, W, (n < 12) ? n % 6 : 0);
      v1 = make_vector(N, W, 0);
      v2 = make_vector(N, W, 0);
      v3 = make_vector(N, W, 0);
      if (n == 0 && N == 6) begin
        v  = '{'h45, 'h32, 'h67, 'h09, 'h47, 'h78};
        v1 = v; v2 = v; v3 = v;
      end
      foreach (alg_in[i]) alg_in[i] = W'(v[i]);
      #1;
      expect_true(same(ref_sort_desc(v), alg_out), "algorithmic result wrong");
      n_alg++;
      fork
        run_cv(v);
        run_mod(0, v, poke);
        run_mod(1, v1, poke);
        run_mod(2, v2, poke);
        run_mod(3, v3, poke);
      join
      @(posedge clk);
      #1;
    end
    $display("[N=%0d W=%0d] mechanisms: sorted arrays %0d, full pipeline %0d, mux to intermediate %0d, demux to output %0d, start while busy %0d, sequential runs with overlapping tier units %0d",
             N, W, n_alg, n_pipe_full, n_mux_inter, n_demux_out, n_busy_start, n_overlap);
    expect_true(n_pipe_full > 0,  "conveyor pipeline never ran full");
    expect_true(n_mux_inter > 0,  "combined multiplexers never took the intermediate registers");
    expect_true(n_demux_out > 0,  "combined demultiplexers never fed the output registers");
    expect_true(n_busy_start > 0, "no start was given while busy");
    expect_true(n_overlap > 0,    "sequential tier units never overlapped");
    finished = 1'b1;
  end

endmodule
