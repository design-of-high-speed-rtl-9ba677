// Self-checking testbench for ling_sum_cell: all eight input combinations,
// compared with d_i XOR (p_(i-1) AND H_(i-1)), the sum written with the true
// carry p_(i-1).H_(i-1) rather than with the multiplexer.
module ling_sum_cell_tb;
  int checks = 0, failures = 0;
  logic d_i, p_im1, h_im1, s;
  ling_sum_cell dut (.d_i(d_i), .p_im1(p_im1), .h_im1(h_im1), .s(s));
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {d_i, p_im1, h_im1} = 3'(v); #1;
      checks++;
      if (s !== (v[2] ^ (v[1] & v[0]))) begin
        failures++; $display("FAIL %b -> %b", 3'(v), s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
