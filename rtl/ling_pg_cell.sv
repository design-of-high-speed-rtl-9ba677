// Ling pair cell: merges two neighbouring bit positions into the inputs of
// the Ling prefix trees,
//   G*_i = g_i + g_(i-1),   P*_i = p_i . p_(i-1).
// The Ling tree combines the pairs (G*_i, P*_(i-1)). Purely combinational.
module ling_pg_cell (
  input  logic g_i,
  input  logic g_im1,
  input  logic p_i,
  input  logic p_im1,
  output logic gs,  // G*_i
  output logic ps   // P*_i
);
  always_comb begin
    gs = g_i | g_im1;
    ps = p_i & p_im1;
  end
endmodule
