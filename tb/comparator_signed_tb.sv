// Self-checking testbench for comparator_signed: every pair of 8-bit two's
// complement operands (65536 cases, including all that overflow the
// subtraction), compared with the simulator's signed relational operators,
// and a 16-bit instance on 20000 random pairs.
module comparator_signed_tb;
  int checks = 0, failures = 0, overflows = 0;
  logic [7:0] a, b;
  logic agtb, altb, equal;
  comparator_signed dut (.a(a), .b(b), .agtb(agtb), .altb(altb), .equal(equal));
  logic [15:0] a16, b16;
  logic agtb16, altb16, equal16;
  comparator_signed #(.N(16)) dut16 (.a(a16), .b(b16), .agtb(agtb16), .altb(altb16), .equal(equal16));
  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (j - i > 127 || j - i < -128) overflows++;
        if (agtb !== (i > j) || altb !== (i < j) || equal !== (i == j)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d gt=%b lt=%b eq=%b", i, j, agtb, altb, equal);
        end
      end
    checks++;
    if (overflows == 0) failures++;
    $display("cases where B-A overflows: %0d", overflows);
    // 16-bit instance: random pairs, a quarter of them equal
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = (n % 4 == 0) ? a16 : 16'($urandom); #1;
      checks++;
      if (agtb16 !== ($signed(a16) > $signed(b16)) || altb16 !== ($signed(a16) < $signed(b16)) ||
          equal16 !== (a16 == b16)) begin
        failures++;
        if (failures < 10) $display("FAIL16 a=%0d b=%0d", $signed(a16), $signed(b16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
