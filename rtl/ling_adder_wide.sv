// Wide Kogge-Stone Ling adder built from BLK-bit Kogge-Stone Ling blocks.
//
// N/BLK blocks of ks_ling_adder are placed side by side; the carry out of
// each block is the carry in of the next, the lowest block takes cin and the
// highest gives cout. With the default BLK = 16 this forms the 32-bit adder
// (and, with N = 64, the 64-bit adder) from the 16-bit block, as in the
// design. How the blocks are joined is not specified there; a plain carry
// chain between blocks is this implementation's choice. N must be a
// multiple of BLK. Purely combinational.
module ling_adder_wide #(
  parameter int unsigned N   = 32,
  parameter int unsigned BLK = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = N / BLK;

  if (N % BLK != 0) begin : g_bad_size
    $error("ling_adder_wide: N must be a multiple of BLK");
  end

  logic [NB:0] c;
  assign c[0] = cin;
  for (genvar k = 0; k < NB; k++) begin : g_blk
    ks_ling_adder #(.N(BLK)) u_blk (
      .a   (a[k*BLK +: BLK]),
      .b   (b[k*BLK +: BLK]),
      .cin (c[k]),
      .sum (sum[k*BLK +: BLK]),
      .cout(c[k+1])
    );
  end
  assign cout = c[NB];
endmodule
