// wpt_pkg: shared helpers of the wavelet packet transform (WPT) pipeline.
//
// The pipeline computes a complete J-level wavelet packet tree with one
// processor per level. Every processor finishes one window of L
// multiply-accumulate steps every L clock cycles, and the input takes one
// sample every L/2 cycles. All schedule arithmetic (which band a processor
// works on, which memory cell holds which sample) is integer arithmetic on
// free-running counters; the functions here give the floor division and
// the non-negative modulo that arithmetic needs, the size of one memory
// bank of a level, and the scale-and-saturate step every filter applies.
package wpt_pkg;

  // Non-negative remainder of a / n (n > 0), also for negative a.
  function automatic int pmod(int a, int n);
    int r;
    r = a % n;
    return (r < 0) ? r + n : r;
  endfunction

  // Division of a by n (n > 0) rounded towards minus infinity.
  function automatic int fdiv(int a, int n);
    int q;
    q = a / n;
    if ((a % n != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  // Cells in one bank of the memory of tree level `level`.
  // Level 0 has a single bank of L input samples. Level i >= 1 holds 2^i
  // bands of L samples, split into a high-pass bank (odd bands) and a
  // low-pass bank (even bands) of 2^(i-1) * L cells each.
  function automatic int bank_depth(int level, int l);
    return (level == 0) ? l : (1 << (level - 1)) * l;
  endfunction

  // Address width that covers the largest bank of a J-level tree.
  function automatic int addr_width(int j, int l);
    int d;
    d = bank_depth((j > 1) ? j - 1 : 0, l);
    return (d > 1) ? $clog2(d) : 1;
  endfunction

endpackage
