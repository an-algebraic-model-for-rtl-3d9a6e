// gp_combine: one node of the carry monoid, the operator "o".
//
// Given the (generate, propagate) tuple of a more significant group of bit
// positions (hi) and of the adjacent less significant group (lo), it returns
// the tuple of the two groups taken together:
//   out.g = hi.g | (hi.p & lo.g),   out.p = hi.p & lo.p
// Purely combinational, one AND-OR gate and one AND gate. The operator is
// the one defined for the adder design space; packaging it as a cell of its
// own is this design's choice so that prefix networks are built from it.
module gp_combine
  import modgen_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t out
);
  assign out = gp_op(hi, lo);
endmodule
