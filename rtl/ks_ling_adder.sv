// Kogge-Stone Ling adder, N bits with carry in and carry out.
//
// Instead of the carries c_i the tree computes Ling carries H_i, where
// c_i = p_i . H_i. Neighbouring bits are first merged into
//   G*_i = g_i + g_(i-1),  P*_i = p_i . p_(i-1)         (ling_pg_cell)
// and H_i is the prefix (G*_i,P*_(i-1)) o (G*_(i-2),P*_(i-3)) o ... of every
// second position. The even and the odd positions therefore form two
// independent Kogge-Stone trees of log2(N) - 1 levels each, which here appear
// as one array with distances 2, 4, 8, ...; a gray cell is used where the
// lower group already reaches the bottom of its tree. Each sum bit i >= 1 is
// a multiplexer selected by H_(i-1) between d_i and d_i XOR p_(i-1)
// (ling_sum_cell); the carry out is p_(N-1) . H_(N-1).
//
// The carry in is merged into the generate of bit 0 by a gray cell,
// g_0' = g_0 + p_0.cin, which keeps g_0' => p_0 so the Ling relation still
// holds; sum bit 0 is d_0 XOR cin. The equations, cells and the two-tree
// structure follow the design; the carry in is this implementation's
// addition. Purely combinational.
module ks_ling_adder
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
  localparam int unsigned L = $clog2(N) - 1;  // levels of each parity tree

  logic [N-1:0] g, p, d;      // bit generate (bit 0 includes cin), propagate, half sum
  logic [N-1:0] gs;           // G*_i
  logic [N-2:0] ps;           // P*_i (the top position's is not needed)
  gp_t  [N-1:0] t [L+1];      // tree nodes, t[L][i].g = H_i
  gp_t          b0;           // bit 0 before the carry in is merged

  bit_pg_cell u_pg0 (.a(a[0]), .b(b[0]), .g(b0.g), .p(b0.p), .d(d[0]));
  gray_cell   u_cin (.hi(b0), .lo_g(cin), .g(g[0]));
  assign p[0] = b0.p;
  for (genvar i = 1; i < N; i++) begin : g_pre
    bit_pg_cell u_pg (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]), .d(d[i]));
  end

  // pair cells; below bit 0 there is nothing, so G*_0 = g_0 and P*_0 = p_0
  assign gs[0] = g[0];
  assign ps[0] = p[0];
  for (genvar i = 1; i < N; i++) begin : g_pair
    if (i < N - 1) begin : g_full
      ling_pg_cell u_lpg (.g_i(g[i]), .g_im1(g[i-1]), .p_i(p[i]), .p_im1(p[i-1]),
                          .gs(gs[i]), .ps(ps[i]));
    end else begin : g_top
      assign gs[i] = g[i] | g[i-1];            // top pair: only G* is used
    end
  end

  // tree leaves (G*_i, P*_(i-1)); the leaf of bit 0 has no lower partner
  assign t[0][0] = '{g: gs[0], p: 1'b0};
  for (genvar i = 1; i < N; i++) begin : g_leaf
    assign t[0][i] = '{g: gs[i], p: ps[i-1]};
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned DIST = 2 << l;    // 2, 4, 8, ...: stays within one parity
    for (genvar i = 0; i < N; i++) begin : g_pos
      if (i < DIST) begin : g_pass
        assign t[l+1][i] = t[l][i];
      end else if (i - DIST < DIST) begin : g_gray
        gray_cell u_gray (.hi(t[l][i]), .lo_g(t[l][i-DIST].g), .g(t[l+1][i].g));
        assign t[l+1][i].p = 1'b0;
      end else begin : g_black
        black_cell u_black (.hi(t[l][i]), .lo(t[l][i-DIST]), .o(t[l+1][i]));
      end
    end
  end

  assign sum[0] = d[0] ^ cin;
  for (genvar k = 1; k < N; k++) begin : g_sum
    ling_sum_cell u_sum (.d_i(d[k]), .p_im1(p[k-1]), .h_im1(t[L][k-1].g), .s(sum[k]));
  end

  assign cout = p[N-1] & t[L][N-1].g;
endmodule
