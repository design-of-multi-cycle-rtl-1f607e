// Reference model and stimulus helpers shared by the sorter testbenches.
//
// ref_sort_desc orders a dynamic array descending with a plain insertion
// sort, an algorithm unrelated to the even-odd networks under test, so the
// expected results do not depend on the structure being checked.
// make_vector builds test arrays: random ones, and a few fixed patterns
// (all equal, ascending, descending, alternating) selected by 'kind'.
package tb_sort_pkg;

  typedef int unsigned vec_t[];

  function automatic vec_t ref_sort_desc(vec_t v);
    vec_t r = v;
    for (int i = 1; i < r.size(); i++) begin
      int unsigned key = r[i];
      int j = i - 1;
      while (j >= 0 && r[j] < key) begin
        r[j+1] = r[j];
        j--;
      end
      r[j+1] = key;
    end
    return r;
  endfunction

  // kind 0: random, 1: all equal, 2: ascending, 3: descending,
  // 4: alternating min/max, 5: random with many duplicates
  function automatic vec_t make_vector(int n, int w, int kind);
    vec_t v = new[n];
    int unsigned mask = (w >= 32) ? 32'hffff_ffff : ((32'd1 << w) - 1);
    int unsigned base = $urandom & mask;
    for (int i = 0; i < n; i++) begin
      case (kind)
        1:       v[i] = base;
        2:       v[i] = (base + i) & mask;
        3:       v[i] = (mask - i) & mask;
        4:       v[i] = (i % 2 == 0) ? 0 : mask;
        5:       v[i] = ($urandom % 3) & mask;
        default: v[i] = $urandom & mask;
      endcase
    end
    return v;
  endfunction

endpackage
