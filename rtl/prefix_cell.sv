// prefix_cell: the processing node of a parallel prefix graph.
//
// Combines the (g,p) pair of a more significant span `hi` with that of the
// adjoining less significant span `lo` into the pair of the joined span:
//   g_out = g_hi OR (p_hi AND g_lo)
//   p_out = p_hi AND p_lo
// This is the associative carry operator of a carry-lookahead adder: two AND
// gates and one OR gate. Purely combinational; one gate level of carry path.
// The buffer node of a prefix graph (a node that only forwards its input)
// needs no module: the trees below forward the value with an assignment.
module prefix_cell
  import prefix_pkg::*;
(
  input  gp_t hi,   // pair of the upper (more significant) span
  input  gp_t lo,   // pair of the adjoining lower span
  output gp_t out   // pair of the joined span
);

  assign out.g = hi.g | (hi.p & lo.g);
  assign out.p = hi.p & lo.p;

endmodule
