// Black cell of a prefix network (one AND-OR gate plus one AND gate).
//
// Combines the (generate, propagate) pair of a more significant span "hi"
// with that of the adjacent less significant span "lo":
//   out.g = hi.g | hi.p & lo.g,   out.p = hi.p & lo.p.
// Purely combinational. White cells (plain buffers) need no module.
module prefix_cell
  import hc_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t out
);

  always_comb out = prefix_op(hi, lo);

endmodule
