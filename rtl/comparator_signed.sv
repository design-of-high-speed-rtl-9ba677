// Signed (two's complement) magnitude comparator on a Kogge-Stone Ling
// adder.
//
// The adder forms B - A = B + ~A + 1. N is the sign bit of the difference;
// the subtraction overflowed (V) when A and B have different signs and the
// sign of the difference differs from the sign of B. The true sign of B - A
// is S = N XOR V, so S = 1 means A > B. With the zero detector Z:
//   agtb = S,   equal = Z,   altb = ~S & ~Z.
// The method, the signals N, V, S, Z and the 8-bit width follow the design;
// the reduction NOR zero detector is this implementation's choice. Purely
// combinational.
module comparator_signed #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         agtb,
  output logic         altb,
  output logic         equal
);
  logic [N-1:0] a_n;
  logic [N-1:0] diff;
  logic         c;      // carry out, not needed for the signed decision
  logic         neg, ovf, sgn, z;

  assign a_n = ~a;

  ks_ling_adder #(.N(N)) u_add (.a(b), .b(a_n), .cin(1'b1), .sum(diff), .cout(c));

  always_comb begin
    neg   = diff[N-1];
    ovf   = (a[N-1] ^ b[N-1]) & (neg ^ b[N-1]);
    sgn   = neg ^ ovf;
    z     = ~|diff;
    agtb  = sgn;
    equal = z;
    altb  = ~sgn & ~z;
  end
endmodule
