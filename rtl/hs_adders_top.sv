// Top level: the high-speed adder designs side by side.
//
//  * flt_*  the third-order lattice filter on 32-bit Kogge-Stone Ling adders
//           (clocked, synchronous reset);
//  * cu_*   the 8-bit unsigned magnitude comparator, cs_* the 8-bit signed
//           one, both on the Kogge-Stone Ling adder;
//  * ks_*, bk_*, sk_*, hc_*, ln_*  the 16-bit Kogge-Stone, Brent-Kung,
//           Sklansky, Han-Carlson and Kogge-Stone Ling adders, each with its
//           own operands, carry in, sum and carry out.
// The parts share no signals except that all adders are built from the same
// bit, gray, black and Ling cells. Everything except the filter's delay
// registers is combinational.
module hs_adders_top #(
  parameter int unsigned FW = 32,  // filter sample width
  parameter int unsigned CN = 8,   // comparator width
  parameter int unsigned AN = 16   // width of the stand-alone adders
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [FW-1:0] flt_x,
  output logic [FW-1:0] flt_y,

  input  logic [CN-1:0] cu_a, cu_b,
  output logic          cu_agtb, cu_altb, cu_equal,
  input  logic [CN-1:0] cs_a, cs_b,
  output logic          cs_agtb, cs_altb, cs_equal,

  input  logic [AN-1:0] ks_a, ks_b,
  input  logic          ks_cin,
  output logic [AN-1:0] ks_sum,
  output logic          ks_cout,
  input  logic [AN-1:0] bk_a, bk_b,
  input  logic          bk_cin,
  output logic [AN-1:0] bk_sum,
  output logic          bk_cout,
  input  logic [AN-1:0] sk_a, sk_b,
  input  logic          sk_cin,
  output logic [AN-1:0] sk_sum,
  output logic          sk_cout,
  input  logic [AN-1:0] hc_a, hc_b,
  input  logic          hc_cin,
  output logic [AN-1:0] hc_sum,
  output logic          hc_cout,
  input  logic [AN-1:0] ln_a, ln_b,
  input  logic          ln_cin,
  output logic [AN-1:0] ln_sum,
  output logic          ln_cout
);
  lattice_filter #(.W(FW)) u_filter (.clk(clk), .rst(rst), .x(flt_x), .y(flt_y));

  comparator_unsigned #(.N(CN)) u_cmp_u (.a(cu_a), .b(cu_b), .agtb(cu_agtb), .altb(cu_altb), .equal(cu_equal));
  comparator_signed   #(.N(CN)) u_cmp_s (.a(cs_a), .b(cs_b), .agtb(cs_agtb), .altb(cs_altb), .equal(cs_equal));

  kogge_stone_adder #(.N(AN)) u_ks (.a(ks_a), .b(ks_b), .cin(ks_cin), .sum(ks_sum), .cout(ks_cout));
  brent_kung_adder  #(.N(AN)) u_bk (.a(bk_a), .b(bk_b), .cin(bk_cin), .sum(bk_sum), .cout(bk_cout));
  sklansky_adder    #(.N(AN)) u_sk (.a(sk_a), .b(sk_b), .cin(sk_cin), .sum(sk_sum), .cout(sk_cout));
  han_carlson_adder #(.N(AN)) u_hc (.a(hc_a), .b(hc_b), .cin(hc_cin), .sum(hc_sum), .cout(hc_cout));
  ks_ling_adder     #(.N(AN)) u_ln (.a(ln_a), .b(ln_b), .cin(ln_cin), .sum(ln_sum), .cout(ln_cout));
endmodule
