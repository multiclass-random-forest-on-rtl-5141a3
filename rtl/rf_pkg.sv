// rf_pkg: constants and helper functions shared by the random-forest engine.
//
// A tree of depth D is stored as a complete binary tree in heap order:
// internal node i (0 .. 2^D-2) has children 2i+1 and 2i+2, and leaf k
// (0 .. 2^D-1) is heap node k + 2^D - 1. The functions below give the
// array sizes and index widths that every module derives from its
// parameters, so that all of them agree on the layout.
package rf_pkg;

  // Width of an index into n entries, never below 1 bit.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Number of internal nodes of a complete tree of depth d.
  function automatic int unsigned n_internal(input int unsigned d);
    return (1 << d) - 1;
  endfunction

  // Number of leaves of a complete tree of depth d.
  function automatic int unsigned n_leaves(input int unsigned d);
    return 1 << d;
  endfunction

endpackage
