// Self-checking testbench for bit_pg_cell: all four input combinations,
// compared with the truth table of a AND b, a OR b, a XOR b.
module bit_pg_cell_tb;
  int checks = 0, failures = 0;
  logic a, b, g, p, d;
  bit_pg_cell dut (.a(a), .b(b), .g(g), .p(p), .d(d));
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v); #1;
      checks++;
      // expected: g only for 11, p for all but 00, d for 01 and 10
      if (g !== (v == 3) || p !== (v != 0) || d !== (v == 1 || v == 2)) begin
        failures++; $display("FAIL a=%b b=%b g=%b p=%b d=%b", a, b, g, p, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
