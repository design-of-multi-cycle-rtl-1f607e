// Shared constants and helper functions for the even-odd transposition
// sorters.
//
// An even-odd (odd-even transposition) sort of N numbers runs N tiers of
// "compare and rearrange" operations. Tiers alternate: an even tier pairs
// lanes (0,1), (2,3), ... and has N/2 operations; an odd tier pairs lanes
// (1,2), (3,4), ... and has N/2-1. The whole sort therefore takes
// N(N-1)/2 operations. All sorters in this library order the result
// descending: lane 0 ends up holding the largest number.
//
// The functions below give these counts so that every device, and every
// testbench, derives its schedule from the same formulas. N is expected to
// be even, as in all structures the devices are derived from.
package sort_pkg;

  // Number of compare-and-rearrange operations in tier t (t counted from 0).
  function automatic int unsigned tier_ops(int unsigned n, int unsigned t);
    return (t % 2 == 0) ? n / 2 : n / 2 - 1;
  endfunction

  // First (upper) lane of the k-th pair of tier t.
  function automatic int unsigned pair_lane(int unsigned t, int unsigned k);
    return 2 * k + (t % 2);
  endfunction

  // Total operations of the sort: N(N-1)/2.
  function automatic int unsigned total_ops(int unsigned n);
    return n * (n - 1) / 2;
  endfunction

  // Controller state shared by the multi-cycle devices.
  typedef enum logic {
    S_IDLE = 1'b0,
    S_RUN  = 1'b1
  } run_state_e;

endpackage
