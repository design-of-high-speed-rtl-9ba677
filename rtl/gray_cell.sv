// Gray cell of a prefix network: combines the group i:k with the group
// k-1:j and produces only the group generate of i:j,
//   G(i:j) = G(i:k) + P(i:k).G(k-1:j).
// Used where the lower group already reaches the carry-in, so the group
// propagate is no longer needed. Purely combinational.
module gray_cell
  import adder_pkg::*;
(
  input  gp_t  hi,    // {G,P} of the upper group i:k
  input  logic lo_g,  // G of the lower group k-1:j
  output logic g      // G of i:j
);
  always_comb g = hi.g | (hi.p & lo_g);
endmodule
