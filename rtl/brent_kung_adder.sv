// Brent-Kung parallel-prefix adder, N bits with carry in and carry out.
//
// Bit cells form g, p and d; a gray cell merges the carry in into bit 0
// (G(0:-1) = g_0 + p_0.cin). An up-sweep of log2 N levels forms the prefixes
// of 2-, 4-, 8-, ... bit groups (level u combines position i with i-2^u
// where i+1 is a multiple of 2^(u+1)); a down-sweep of one level fewer fans
// the finished prefixes back to the positions in between (level u combines i
// with i-2^u where i+1 = 3*2^u, 5*2^u, ...). That is 2 log2 N - 1 levels
// with fanout at most 2. Cells whose lower group reaches the carry in are
// gray cells, the rest black. Sum bit 0 = d_0 XOR cin, sum bit k =
// d_k XOR G(k-1:-1), cout = G(N-1:-1).
//
// The network follows the Brent-Kung description of the design; the buffers
// it mentions are left out, as it says is usual in practice. The OR
// propagate, half-sum XOR and carry in are this implementation's choices.
// Purely combinational.
module brent_kung_adder
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
  localparam int unsigned L  = $clog2(M);   // up-sweep levels
  localparam int unsigned NL = 2 * L - 1;   // all levels

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
    // up-sweep levels 0..L-1 use distance 2^l, down-sweep levels L..2L-2 use
    // distance 2^(2L-2-l)
    localparam int unsigned DIST = (l < L) ? (1 << l) : (1 << (NL - 1 - l));
    localparam bit          UP   = (l < L);
    for (genvar i = 0; i < M; i++) begin : g_pos
      localparam bit ACT = UP ? (((i + 1) % (2 * DIST)) == 0)
                              : ((((i + 1) % (2 * DIST)) == DIST) && (i + 1 > 2 * DIST));
      if (!ACT) begin : g_pass
        assign t[l+1][i] = t[l][i];
      end else if (!UP || (i + 1 == 2 * DIST)) begin : g_gray
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
