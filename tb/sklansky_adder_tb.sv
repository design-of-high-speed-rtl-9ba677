// Self-checking testbench for sklansky_adder.
// Instantiates the adder at 16 bits (default), 8 and 32 bits, the widths of
// the adder comparison table, and compares {cout,sum} with a + b + cin
// computed by the simulator's own arithmetic, for corner cases (all ones,
// alternating patterns, single carries through every bit) and random
// operands. It also checks the depth of the prefix tree at each width
// against the stated stage count of this adder type (log2 N levels).
module sklansky_adder_tb;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16; logic c16, co16;
  logic [7:0]  a8,  b8,  s8;  logic c8,  co8;
  logic [31:0] a32, b32, s32; logic c32, co32;

  sklansky_adder dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  sklansky_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  sklansky_adder #(.N(32)) dut32 (.a(a32), .b(b32), .cin(c32), .sum(s32), .cout(co32));

  task automatic apply(input logic [31:0] a, input logic [31:0] b, input logic c);
    logic [16:0] e16; logic [8:0] e8; logic [32:0] e32;
    a16 = a[15:0]; b16 = b[15:0]; c16 = c;
    a8  = a[7:0];  b8  = b[7:0];  c8  = c;
    a32 = a;       b32 = b;       c32 = c;
    #1;
    e16 = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(c);
    e8  = {1'b0, a[7:0]}  + {1'b0, b[7:0]}  + 9'(c);
    e32 = {1'b0, a}       + {1'b0, b}       + 33'(c);
    checks += 3;
    if ({co16, s16} !== e16) begin failures++; if (failures < 10) $display("FAIL16 %h+%h+%b = %h, want %h", a16, b16, c, {co16, s16}, e16); end
    if ({co8, s8}   !== e8)  begin failures++; if (failures < 10) $display("FAIL8 %h+%h+%b = %h, want %h", a8, b8, c, {co8, s8}, e8); end
    if ({co32, s32} !== e32) begin failures++; if (failures < 10) $display("FAIL32 %h+%h+%b = %h, want %h", a32, b32, c, {co32, s32}, e32); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks += 3;
    if (dut8.L != 3)   begin failures++; $display("FAIL depth at 8 bits: %0d", dut8.L); end
    if (dut16.L != 4) begin failures++; $display("FAIL depth at 16 bits: %0d", dut16.L); end
    if (dut32.L != 5) begin failures++; $display("FAIL depth at 32 bits: %0d", dut32.L); end
    for (int c = 0; c < 2; c++) begin
      apply('0, '0, 1'(c));
      apply('1, '0, 1'(c));
      apply('1, '1, 1'(c));
      apply(32'h5555_5555, 32'haaaa_aaaa, 1'(c));
      apply(32'haaaa_aaaa, 32'haaaa_aaaa, 1'(c));
      for (int k = 0; k < 32; k++) begin
        apply(32'(1) << k, 32'(1) << k, 1'(c));         // one carry generated at bit k
        apply((32'(1) << k) - 1, 32'(1), 1'(c));        // carry runs k bits
        apply(~(32'(1) << k), 32'(1) << k, 1'(c));      // all propagate
      end
    end
    for (int n = 0; n < 20000; n++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
