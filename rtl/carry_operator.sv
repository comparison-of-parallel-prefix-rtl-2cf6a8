// carry_operator: the fundamental carry operator "o" of prefix addition.
//
// Combines the (generate, propagate) pair of a more significant bit group
// (hi) with that of the adjacent, less significant group (lo) into the pair of
// the merged group:
//   G = G_hi | (P_hi & G_lo)
//   P = P_hi & P_lo
// The operator is associative, which is what lets a prefix network evaluate
// all carries in a logarithmic number of levels. Both the Kogge-Stone and the
// Brent-Kung networks are built from this one cell. Purely combinational.
module carry_operator
  import ppa_pkg::*;
(
  input  pg_t hi,
  input  pg_t lo,
  output pg_t out
);

  assign out.g = hi.g | (hi.p & lo.g);
  assign out.p = hi.p & lo.p;

endmodule
