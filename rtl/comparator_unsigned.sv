// Unsigned magnitude comparator on a Kogge-Stone Ling adder.
//
// The adder forms B - A = B + ~A + 1: the operand A goes through the
// complement unit (bitwise inversion) and the carry in is tied to 1. A carry
// out C = 1 means A <= B; a zero detector on the difference gives Z = 1 for
// A == B. Hence
//   agtb  = ~C,   equal = Z,   altb = C & ~Z.
// The subtract-and-test method, the signals C and Z, the outputs AGTB, ALTB
// and Equal and the 8-bit width follow the design; using a reduction NOR as
// the zero detector is this implementation's choice. Purely combinational.
module comparator_unsigned #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         agtb,
  output logic         altb,
  output logic         equal
);
  logic [N-1:0] a_n;   // complement of A
  logic [N-1:0] diff;  // B - A
  logic         c, z;

  assign a_n = ~a;

  ks_ling_adder #(.N(N)) u_add (.a(b), .b(a_n), .cin(1'b1), .sum(diff), .cout(c));

  always_comb begin
    z     = ~|diff;
    agtb  = ~c;
    equal = z;
    altb  = c & ~z;
  end
endmodule
