// Bit-level pre-processing cell, the first stage of every adder.
// For one bit position it forms the bit generate g = a AND b, the bit
// propagate p = a OR b and the half sum d = a XOR b. The Ling adder uses all
// three; the conventional prefix adders use g and p in the tree and d for the
// final sum. Purely combinational.
module bit_pg_cell (
  input  logic a,
  input  logic b,
  output logic g,
  output logic p,
  output logic d
);
  always_comb begin
    g = a & b;
    p = a | b;
    d = a ^ b;
  end
endmodule
