// Self-checking testbench for algorithmic_od.
//  * N = 4, W = 2: every one of the 256 possible inputs.
//  * N = 6, W = 8: the six numbers of the published simulation
//    (45 32 67 09 47 78 hex, sorted to 78 67 47 45 32 09), then random sets.
//  * N = 16, W = 8 (default): random and patterned arrays.
// Results are compared lane by lane with an insertion-sort reference.
module tb_algorithmic_od;
  import tb_sort_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] i4 [4],  o4 [4];
  logic [7:0] i6 [6],  o6 [6];
  logic [7:0] i16 [16], o16 [16];

  algorithmic_od #(.N(4), .W(2)) u4  (.d_in(i4),  .d_out(o4));
  algorithmic_od #(.N(6), .W(8)) u6  (.d_in(i6),  .d_out(o6));
  algorithmic_od                 u16 (.d_in(i16), .d_out(o16));

  task automatic compare(vec_t in, vec_t got, string tag);
    vec_t exp = ref_sort_desc(in);
    checks++;
    foreach (exp[i])
      if (got[i] != exp[i]) begin
        failures++;
        $display("%s lane %0d: got %0d expected %0d", tag, i, got[i], exp[i]);
        break;
      end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t v, g;
    // exhaustive small case
    for (int x = 0; x < 256; x++) begin
      v = new[4]; g = new[4];
      for (int i = 0; i < 4; i++) begin
        v[i] = (x >> (2 * i)) & 3;
        i4[i] = 2'(v[i]);
      end
      #1;
      foreach (g[i]) g[i] = o4[i];
      compare(v, g, "N=4");
    end
    // published example
    v = '{'h45, 'h32, 'h67, 'h09, 'h47, 'h78};
    foreach (v[i]) i6[i] = 8'(v[i]);
    #1;
    g = new[6];
    foreach (g[i]) g[i] = o6[i];
    compare(v, g, "N=6 example");
    checks++;
    if (o6[0] != 8'h78 || o6[5] != 8'h09) begin
      failures++;
      $display("example: ends are %h .. %h", o6[0], o6[5]);
    end
    for (int n = 0; n < 300; n++) begin
      v = make_vector(6, 8, n % 6);
      foreach (v[i]) i6[i] = 8'(v[i]);
      #1;
      foreach (g[i]) g[i] = o6[i];
      compare(v, g, "N=6");
    end
    g = new[16];
    for (int n = 0; n < 500; n++) begin
      v = make_vector(16, 8, n % 6);
      foreach (v[i]) i16[i] = 8'(v[i]);
      #1;
      foreach (g[i]) g[i] = o16[i];
      compare(v, g, "N=16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
