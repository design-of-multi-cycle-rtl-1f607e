// Self-checking testbench for conveyor_od at N = 6 (published example
// first) and at the default N = 16. Arrays are streamed in, one per clock
// with occasional bubbles; each result must appear exactly N clocks after
// its array was taken, in order, sorted descending. Back-to-back results
// (a full pipeline) must be seen, and reset must clear the outputs.
module tb_conveyor_od;
  import tb_sort_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int full_runs_a = 0, full_runs_b = 0;
  logic rst;

  logic       va, vqa;
  logic [7:0] ia [6],  oa [6];
  logic       vb, vqb;
  logic [7:0] ib [16], ob [16];

  conveyor_od #(.N(6)) u_a (.clk, .rst, .in_valid(va), .d_in(ia), .out_valid(vqa), .d_out(oa));
  conveyor_od          u_b (.clk, .rst, .in_valid(vb), .d_in(ib), .out_valid(vqb), .d_out(ob));

  // expected results with the cycle at which each must come out
  vec_t exp_a [$], exp_b [$];
  int   due_a [$], due_b [$];
  int   cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: sample just after each edge
  initial begin
    int prev_a, prev_b;
    prev_a = 0; prev_b = 0;
    forever begin
      @(posedge clk);
      #2;
      if (!rst) begin
        if (vqa) begin
          vec_t e;
          checks++;
          if (exp_a.size() == 0 || due_a[0] != cyc) begin
            failures++;
            $display("N=6: unexpected output at cycle %0d", cyc);
          end else begin
            e = exp_a.pop_front();
            void'(due_a.pop_front());
            foreach (e[i]) if (oa[i] != 8'(e[i])) begin
              failures++;
              $display("N=6 lane %0d got %0h expected %0h", i, oa[i], e[i]);
              break;
            end
          end
          if (prev_a) full_runs_a++;
        end
        if (vqb) begin
          vec_t e;
          checks++;
          if (exp_b.size() == 0 || due_b[0] != cyc) begin
            failures++;
            $display("N=16: unexpected output at cycle %0d", cyc);
          end else begin
            e = exp_b.pop_front();
            void'(due_b.pop_front());
            foreach (e[i]) if (ob[i] != 8'(e[i])) begin
              failures++;
              $display("N=16 lane %0d got %0h expected %0h", i, ob[i], e[i]);
              break;
            end
          end
          if (prev_b) full_runs_b++;
        end
        // a result that is overdue
        if (due_a.size() > 0 && due_a[0] < cyc) begin
          failures++; checks++;
          $display("N=6: result due at %0d missing", due_a[0]);
          void'(due_a.pop_front()); void'(exp_a.pop_front());
        end
        if (due_b.size() > 0 && due_b[0] < cyc) begin
          failures++; checks++;
          $display("N=16: result due at %0d missing", due_b[0]);
          void'(due_b.pop_front()); void'(exp_b.pop_front());
        end
      end
      prev_a = vqa;
      prev_b = vqb;
    end
  end

  initial begin
    vec_t v;
    rst = 1'b1; va = 1'b0; vb = 1'b0;
    foreach (ia[i]) ia[i] = '0;
    foreach (ib[i]) ib[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    begin
      bit zero;
      zero = !vqa && !vqb;
      foreach (oa[i]) if (oa[i] != 0) zero = 0;
      foreach (ob[i]) if (ob[i] != 0) zero = 0;
      checks++;
      if (!zero) begin failures++; $display("reset did not clear outputs %b %b %h %h", vqa, vqb, oa[0], ob[0]); end
    end
    for (int n = 0; n < 400; n++) begin
      bit bubble = (n % 17 == 16);
      va = !bubble; vb = !bubble;
      if (!bubble) begin
        if (n == 0) v = '{'h45, 'h32, 'h67, 'h09, 'h47, 'h78};
        else v = make_vector(6, 8, n % 6);
        foreach (ia[i]) ia[i] = 8'(v[i]);
        exp_a.push_back(ref_sort_desc(v));
        due_a.push_back(cyc + 7);
        v = make_vector(16, 8, n % 6);
        foreach (ib[i]) ib[i] = 8'(v[i]);
        exp_b.push_back(ref_sort_desc(v));
        due_b.push_back(cyc + 17);
      end
      @(posedge clk);
      #1;
    end
    va = 1'b0; vb = 1'b0;
    repeat (20) @(posedge clk);
    #3;
    checks++;
    if (exp_a.size() != 0 || exp_b.size() != 0) begin
      failures++;
      $display("results never came out: %0d %0d", exp_a.size(), exp_b.size());
    end
    checks++;
    if (full_runs_a < 100 || full_runs_b < 100) begin
      failures++;
      $display("pipeline never ran full: %0d %0d", full_runs_a, full_runs_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
