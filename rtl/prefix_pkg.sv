// prefix_pkg: types shared by the parallel prefix adders.
//
// Every prefix adder in this library passes (generate, propagate) pairs
// from the pre-processing stage through the carry tree. The pair is kept as
// one packed struct so that a whole row of the prefix graph is a packed
// array `gp_t [N-1:0]`. The encoding (g in the upper bit, p in the lower)
// is this library's own choice.
package prefix_pkg;

  // One node value of a prefix graph: group generate and group propagate.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

endpackage
