// Kogge-Stone parallel-prefix adder, N bits with carry in and carry out.
//
// Bit cells form g, p and the half sum d. A gray cell first merges the carry
// in into bit 0, G(0:-1) = g_0 + p_0.cin, so that position 0 already holds
// its carry out. The tree has log2 N levels; on level l every position
// i >= 2^l combines with position i-2^l, so every cell drives at most two
// others (fanout 2). A cell whose lower group already reaches the carry in
// only needs the generate and is a gray cell; all others are black cells.
// After the tree G(i:-1) is the carry out of bit i: sum bit 0 = d_0 XOR cin,
// sum bit k = d_k XOR G(k-1:-1), cout = G(N-1:-1).
//
// The topology follows the Kogge-Stone description of the design (log2 N
// levels, fanout 2). Choosing OR for the bit propagate and the half sum for
// the final XOR, and adding the carry in, are this implementation's choices.
// Purely combinational.
module kogge_stone_adder
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
  localparam int unsigned M = N;            // prefix positions
  localparam int unsigned L = $clog2(M);    // tree levels

  gp_t  [M-1:0] t [L+1];                    // t[l][i]: {G,P} of position i after level l
  logic [M-1:0] d;                          // half sums

  gp_t b0;                                  // bit 0 before the carry in is merged

  bit_pg_cell u_pg0 (.a(a[0]), .b(b[0]), .g(b0.g), .p(b0.p), .d(d[0]));
  gray_cell   u_cin (.hi(b0), .lo_g(cin), .g(t[0][0].g));  // G(0:-1) = g0 + p0.cin
  assign t[0][0].p = 1'b0;
  for (genvar i = 1; i < M; i++) begin : g_pre
    bit_pg_cell u_pg (.a(a[i]), .b(b[i]), .g(t[0][i].g), .p(t[0][i].p), .d(d[i]));
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned DIST = 1 << l;
    for (genvar i = 0; i < M; i++) begin : g_pos
      if (i < DIST) begin : g_pass
        assign t[l+1][i] = t[l][i];
      end else if (i - DIST < DIST) begin : g_gray
        gray_cell u_gray (.hi(t[l][i]), .lo_g(t[l][i-DIST].g), .g(t[l+1][i].g));
        assign t[l+1][i].p = 1'b0;          // no longer needed once the group reaches cin
      end else begin : g_black
        black_cell u_black (.hi(t[l][i]), .lo(t[l][i-DIST]), .o(t[l+1][i]));
      end
    end
  end

  always_comb begin
    sum[0] = d[0] ^ cin;
    for (int k = 1; k < N; k++) sum[k] = d[k] ^ t[L][k-1].g;
    cout = t[L][M-1].g;
  end
endmodule
