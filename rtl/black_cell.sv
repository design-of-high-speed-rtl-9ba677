// Black cell of a prefix network: the full prefix operator on two adjacent
// groups i:k and k-1:j,
//   G(i:j) = G(i:k) + P(i:k).G(k-1:j),   P(i:j) = P(i:k).P(k-1:j).
// Purely combinational.
module black_cell
  import adder_pkg::*;
(
  input  gp_t hi,  // {G,P} of i:k
  input  gp_t lo,  // {G,P} of k-1:j
  output gp_t o    // {G,P} of i:j
);
  always_comb begin
    o.g = hi.g | (hi.p & lo.g);
    o.p = hi.p & lo.p;
  end
endmodule
