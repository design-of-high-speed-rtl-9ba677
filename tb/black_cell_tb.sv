// Self-checking testbench for black_cell: all sixteen input combinations,
// compared with the prefix operator (G,P)o(G',P') = (G + P.G', P.P').
module black_cell_tb;
  import adder_pkg::*;
  int checks = 0, failures = 0;
  gp_t hi, lo, o;
  black_cell dut (.hi(hi), .lo(lo), .o(o));
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      {hi.g, hi.p, lo.g, lo.p} = 4'(v); #1;
      checks++;
      if (o.g !== (v[3] || (v[2] && v[1])) || o.p !== (v[2] && v[0])) begin
        failures++; $display("FAIL %b -> g=%b p=%b", 4'(v), o.g, o.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
