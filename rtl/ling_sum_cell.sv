// Ling sum cell. With the Ling carry H the true carry into bit i is
// p_(i-1).H_(i-1), so the sum is
//   s_i = H_(i-1) ? (d_i XOR p_(i-1)) : d_i,
// a two-way multiplexer selected by H_(i-1). The XOR of d_i and p_(i-1) does
// not wait for the carry tree. Purely combinational.
module ling_sum_cell (
  input  logic d_i,    // half sum of bit i
  input  logic p_im1,  // bit propagate of bit i-1
  input  logic h_im1,  // Ling carry H_(i-1)
  output logic s       // sum bit i
);
  logic alt;
  always_comb begin
    alt = d_i ^ p_im1;
    s   = h_im1 ? alt : d_i;
  end
endmodule
