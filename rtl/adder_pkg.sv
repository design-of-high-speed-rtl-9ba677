// Shared types for the parallel-prefix adders.
// gp_t bundles a group generate G and group propagate P, the pair that the
// prefix operator (G,P)o(G',P') = (G + P.G', P.P') works on. Every prefix
// network passes these pairs between its gray and black cells.
package adder_pkg;
  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate
  } gp_t;
endpackage
