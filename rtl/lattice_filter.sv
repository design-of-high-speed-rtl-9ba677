// Third-order cascaded IIR lattice filter whose nine adders are W-bit
// Kogge-Stone Ling adders.
//
// Samples are W-bit two's complement integers. With the three unit-delay
// registers s1, s2, s3 the filter computes, every clock cycle,
//   f1 = x  - s1          g1 = f1/2 + s1
//   f2 = f1 - s2          g2 = f2/2 + s2
//   f3 = f2 - s3          g3 = f3/2 + s3
//   y  = g1/2 + g2/2 + g3/2 + f3/2
// and then loads s1 <= g2, s2 <= g3, s3 <= f3. The forward path f runs
// through the three stages, each stage feeds its backward value g to the
// delay of the stage before it, and the ladder of four halved taps sums into
// the output. Every + and - is a ling_adder_wide instance; a subtraction is
// the Ling adder with the subtrahend inverted and carry in 1, which is the
// multiply-by-minus-one of the structure. Multiplication by 0.5 is an
// arithmetic right shift by one bit (rounding towards minus infinity). All
// sums wrap around modulo 2^W.
//
// Timing: x to y is combinational through up to six adders; the delay
// registers load on the rising edge of clk and clear on a synchronous,
// active-high rst. The connection of adders, the coefficients 0.5 and -1,
// the three delays and the 32-bit adder follow the design; the number
// format, the shift for 0.5, the wrap-around and the reset are this
// implementation's choices.
module lattice_filter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W-1:0] s1, s2, s3;        // unit delays
  logic [W-1:0] f1, f2, f3;        // forward values
  logic [W-1:0] g1, g2, g3;        // backward values
  logic [W-1:0] y1, y2;            // partial ladder sums
  logic [W-1:0] s1_n, s2_n, s3_n;  // inverted delay outputs for the subtractions
  logic [8:0]   co;                // carry outs, not used: the arithmetic wraps

  function automatic logic [W-1:0] half(input logic [W-1:0] v);
    return {v[W-1], v[W-1:1]};
  endfunction

  assign s1_n = ~s1;
  assign s2_n = ~s2;
  assign s3_n = ~s3;

  // forward path: f_i = f_(i-1) - s_i
  ling_adder_wide #(.N(W)) u_f1 (.a(x),  .b(s1_n), .cin(1'b1), .sum(f1), .cout(co[0]));
  ling_adder_wide #(.N(W)) u_f2 (.a(f1), .b(s2_n), .cin(1'b1), .sum(f2), .cout(co[1]));
  ling_adder_wide #(.N(W)) u_f3 (.a(f2), .b(s3_n), .cin(1'b1), .sum(f3), .cout(co[2]));

  // backward path: g_i = f_i/2 + s_i
  ling_adder_wide #(.N(W)) u_g1 (.a(half(f1)), .b(s1), .cin(1'b0), .sum(g1), .cout(co[3]));
  ling_adder_wide #(.N(W)) u_g2 (.a(half(f2)), .b(s2), .cin(1'b0), .sum(g2), .cout(co[4]));
  ling_adder_wide #(.N(W)) u_g3 (.a(half(f3)), .b(s3), .cin(1'b0), .sum(g3), .cout(co[5]));

  // output ladder
  ling_adder_wide #(.N(W)) u_y1 (.a(half(g1)), .b(half(g2)), .cin(1'b0), .sum(y1), .cout(co[6]));
  ling_adder_wide #(.N(W)) u_y2 (.a(y1),       .b(half(g3)), .cin(1'b0), .sum(y2), .cout(co[7]));
  ling_adder_wide #(.N(W)) u_y3 (.a(y2),       .b(half(f3)), .cin(1'b0), .sum(y),  .cout(co[8]));

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= g2;
      s2 <= g3;
      s3 <= f3;
    end
  end
endmodule
