// Self-checking testbench for gray_cell: all eight input combinations,
// compared with the group generate G(i:k) + P(i:k).G(k-1:j).
module gray_cell_tb;
  import adder_pkg::*;
  int checks = 0, failures = 0;
  gp_t hi; logic lo_g, g;
  gray_cell dut (.hi(hi), .lo_g(lo_g), .g(g));
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {hi.g, hi.p, lo_g} = 3'(v); #1;
      checks++;
      // generate if the upper group generates, or propagates a lower generate
      if (g !== (v inside {3'b100, 3'b101, 3'b110, 3'b111, 3'b011})) begin
        failures++; $display("FAIL %b -> %b", 3'(v), g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
