// Han-Carlson parallel-prefix adder, N bits with carry in and carry out.
//
// Bit cells form g, p and d; a gray cell merges the carry in into bit 0
// (G(0:-1) = g_0 + p_0.cin). The first level pairs every odd position with
// the even position below it. Then a Kogge-Stone tree runs on the odd
// positions only (distances 2, 4, 8, ...), and one last level of gray cells
// ripples each finished odd prefix into the even position above it: log2 N
// + 1 levels with about half the cells of Kogge-Stone. Sum bit 0 =
// d_0 XOR cin, sum bit k = d_k XOR G(k-1:-1), cout = G(N-1:-1).
//
// The network follows the Han-Carlson description of the design; the OR
// propagate, half-sum XOR and carry in are this implementation's choices.
// Purely combinational.
module han_carlson_adder
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
  localparam int unsigned M  = N;
  localparam int unsigned K  = $clog2(M) - 1;  // odd-position Kogge-Stone levels
  localparam int unsigned NL = K + 2;          // pair level + K levels + even level

  gp_t  [M-1:0] t [NL+1];
  logic [M-1:0] d;

  gp_t b0;                                  // bit 0 before the carry in is merged

  bit_pg_cell u_pg0 (.a(a[0]), .b(b[0]), .g(b0.g), .p(b0.p), .d(d[0]));
  gray_cell   u_cin (.hi(b0), .lo_g(cin), .g(t[0][0].g));  // G(0:-1) = g0 + p0.cin
  assign t[0][0].p = 1'b0;
  for (genvar i = 1; i < M; i++) begin : g_pre
    bit_pg_cell u_pg (.a(a[i]), .b(b[i]), .g(t[0][i].g), .p(t[0][i].p), .d(d[i]));
  end

  for (genvar l = 0; l < NL; l++) begin : g_lvl
    // level 0: distance 1 on odd positions; levels 1..K: distance 2^l on odd
    // positions; level K+1: distance 1 on even positions
    localparam int unsigned DIST = (l == 0 || l == NL - 1) ? 1 : (1 << l);
    localparam int unsigned PAR  = (l == NL - 1) ? 0 : 1;
    for (genvar i = 0; i < M; i++) begin : g_pos
      if ((i % 2) != PAR || i < DIST) begin : g_pass
        assign t[l+1][i] = t[l][i];
      end else if (l == NL - 1 || i - DIST < DIST) begin : g_gray
        gray_cell u_gray (.hi(t[l][i]), .lo_g(t[l][i-DIST].g), .g(t[l+1][i].g));
        assign t[l+1][i].p = 1'b0;
      end else begin : g_black
        black_cell u_black (.hi(t[l][i]), .lo(t[l][i-DIST]), .o(t[l+1][i]));
      end
    end
  end

  always_comb begin
    sum[0] = d[0] ^ cin;
    for (int k = 1; k < N; k++) sum[k] = d[k] ^ t[NL][k-1].g;
    cout = t[NL][M-1].g;
  end
endmodule
