// Self-checking testbench for comparator_unsigned: every pair of 8-bit
// operands (65536 cases), compared with the simulator's unsigned
// relational operators, and a 16-bit instance on 20000 random pairs.
module comparator_unsigned_tb;
  int checks = 0, failures = 0;
  logic [7:0] a, b;
  logic agtb, altb, equal;
  comparator_unsigned dut (.a(a), .b(b), .agtb(agtb), .altb(altb), .equal(equal));
  logic [15:0] a16, b16;
  logic agtb16, altb16, equal16;
  comparator_unsigned #(.N(16)) dut16 (.a(a16), .b(b16), .agtb(agtb16), .altb(altb16), .equal(equal16));
  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (agtb !== (i > j) || altb !== (i < j) || equal !== (i == j)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d gt=%b lt=%b eq=%b", i, j, agtb, altb, equal);
        end
      end
    // 16-bit instance: random pairs, a quarter of them equal
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = (n % 4 == 0) ? a16 : 16'($urandom); #1;
      checks++;
      if (agtb16 !== (a16 > b16) || altb16 !== (a16 < b16) || equal16 !== (a16 == b16)) begin
        failures++;
        if (failures < 10) $display("FAIL16 a=%0d b=%0d", a16, b16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
