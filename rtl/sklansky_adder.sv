// Sklansky (divide-and-conquer) parallel-prefix adder, N bits with carry in
// and carry out.
//
// Bit cells form g, p and d; a gray cell merges the carry in into bit 0
// (G(0:-1) = g_0 + p_0.cin). On level l the positions are split into blocks
// of 2^(l+1); every position in the upper half of a block combines with the
// top position of the lower half. That gives log2 N levels with fanout
// doubling per level (1, 2, 4, 8, ...). Cells whose lower group reaches the
// carry in are gray cells, the rest black. Sum bit 0 = d_0 XOR cin, sum bit
// k = d_k XOR G(k-1:-1), cout = G(N-1:-1).
//
// The network follows the Sklansky description of the design; the OR
// propagate, the half-sum XOR and the carry in are this implementation's
// choices. Purely combinational.
module sklansky_adder
  import adder_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned M = N;
  localparam int unsigned L = $clog2(M);

  gp_t  [M-1:0] t [L+1];
  logic [M-1:0] d;

  gp_t b0;                                  // bit 0 before the carry in is merged

  bit_pg_cell u_pg0 (.a(a[0]), .b(b[0]), .g(b0.g), .p(b0.p), .d(d[0]));
  gray_cell   u_cin (.hi(b0), .lo_g(cin), .g(t[0][0].g));  // G(0:-1) = g0 + p0.cin
  assign t[0][0].p = 1'b0;
  for (genvar i = 1; i < M; i++) begin : g_pre
    bit_pg_cell u_pg (.a(a[i]), .b(b[i]), .g(t[0][i].g), .p(t[0][i].p), .d(d[i]));
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar i = 0; i < M; i++) begin : g_pos
      localparam int unsigned J = ((i >> l) << l) - 1;  // top of the lower half block
      if (((i >> l) & 1) == 0) begin : g_pass
        assign t[l+1][i] = t[l][i];
      end else if ((J >> l) == 0) begin : g_gray
        gray_cell u_gray (.hi(t[l][i]), .lo_g(t[l][J].g), .g(t[l+1][i].g));
        assign t[l+1][i].p = 1'b0;
      end else begin : g_black
        black_cell u_black (.hi(t[l][i]), .lo(t[l][J]), .o(t[l+1][i]));
      end
    end
  end

  always_comb begin
    sum[0] = d[0] ^ cin;
    for (int k = 1; k < N; k++) sum[k] = d[k] ^ t[L][k-1].g;
    cout = t[L][M-1].g;
  end
endmodule
