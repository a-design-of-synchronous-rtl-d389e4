// vcnt_pkg: sizing rules shared by the pre-scaled counter and its sub counters.
//
// An N-bit counter is split into a 1-bit sub counter C1 (bit 0), an (n-1)-bit
// backward-carry-propagation sub counter C2 (bits n-1..1) and an (N-n)-bit
// ripple-carry sub counter C3 (bits N-1..n), with n = floor(log2 N). C3 is
// enabled by m identical copies of the pre-scaled enable PEN2, each copy driving
// at most L flip-flops, so m = ceil((N-n)/L). These rules are the ones of the
// original architecture; the functions below only evaluate them at elaboration.
package vcnt_pkg;

  // floor(log2(x)) for x >= 1
  function automatic int unsigned floor_log2(input int unsigned x);
    int unsigned r;
    r = 0;
    while ((x >> (r + 1)) != 0) r++;
    return r;
  endfunction

  // Width of C2: bits n-1..1 of the counter.
  function automatic int unsigned c2_width(input int unsigned n_total);
    return floor_log2(n_total) - 1;
  endfunction

  // Width of C3: bits N-1..n of the counter.
  function automatic int unsigned c3_width(input int unsigned n_total);
    return n_total - floor_log2(n_total);
  endfunction

  // Number of redundant PEN2 Johnson counters, m = ceil((N-n)/L).
  function automatic int unsigned pen2_copies(input int unsigned n_total,
                                              input int unsigned fanout);
    return (c3_width(n_total) + fanout - 1) / fanout;
  endfunction

endpackage
