// Shared types and helper functions for the speculative Han-Carlson adder and
// the modified square-root carry-select adder.
//
// gp_t is the (generate, propagate) pair carried through a prefix network.
// prefix_op is the "black cell" operator of a prefix adder:
//   (G, P) = (G_hi | P_hi & G_lo, P_hi & P_lo).
// The csla_* functions give the group layout of the square-root carry-select
// adder: a first group of 2 bits, then groups of 2, 3, 4, 5, ... bits, the
// last one cut short at the word width. For 16 bits this is 2-2-3-4-5, the
// usual layout of a 16-bit square-root carry-select adder (the group sizes
// are this design's choice; the source only names the adder style).
package hc_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  function automatic gp_t prefix_op(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Nominal width of carry-select group j (before cutting at the word width).
  function automatic int csla_nom_width(int j);
    return (j == 0) ? 2 : j + 1;
  endfunction

  // Index of the least significant bit of group j.
  function automatic int csla_grp_lo(int j);
    int lo;
    lo = 0;
    for (int i = 0; i < j; i++) lo += csla_nom_width(i);
    return lo;
  endfunction

  // Number of groups needed to cover n bits.
  function automatic int csla_num_groups(int n);
    int j;
    j = 0;
    while (csla_grp_lo(j) < n) j++;
    return j;
  endfunction

  // Actual width of group j in an n-bit adder.
  function automatic int csla_grp_width(int j, int n);
    int w;
    w = csla_nom_width(j);
    if (csla_grp_lo(j) + w > n) w = n - csla_grp_lo(j);
    return w;
  endfunction

endpackage
