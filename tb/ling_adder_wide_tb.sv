// Self-checking testbench for ling_adder_wide: the default 32-bit adder and
// a 64-bit one, both built from 16-bit Ling blocks. {cout,sum} is compared
// with a + b + cin for carries that cross the block boundaries and for
// random operands.
module ling_adder_wide_tb;
  int checks = 0, failures = 0;
  logic [31:0] a32, b32, s32; logic c32, co32;
  logic [63:0] a64, b64, s64; logic c64, co64;

  ling_adder_wide dut32 (.a(a32), .b(b32), .cin(c32), .sum(s32), .cout(co32));
  ling_adder_wide #(.N(64)) dut64 (.a(a64), .b(b64), .cin(c64), .sum(s64), .cout(co64));

  task automatic apply(input logic [63:0] a, input logic [63:0] b, input logic c);
    logic [32:0] e32; logic [64:0] e64;
    a32 = a[31:0]; b32 = b[31:0]; c32 = c;
    a64 = a;       b64 = b;       c64 = c;
    #1;
    e32 = {1'b0, a[31:0]} + {1'b0, b[31:0]} + 33'(c);
    e64 = {1'b0, a} + {1'b0, b} + 65'(c);
    checks += 2;
    if ({co32, s32} !== e32) begin failures++; if (failures < 10) $display("FAIL32 %h+%h+%b", a32, b32, c); end
    if ({co64, s64} !== e64) begin failures++; if (failures < 10) $display("FAIL64 %h+%h+%b", a64, b64, c); end
  endtask

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      apply('1, '0, 1'(c));
      apply('1, '1, 1'(c));
      for (int k = 0; k < 64; k++) begin
        apply((64'(1) << k) - 1, 64'(1), 1'(c));       // carry crosses k bits
        apply(~(64'(1) << k), 64'(1) << k, 1'(c));
        apply(64'(1) << k, 64'(1) << k, 1'(c));
      end
    end
    for (int n = 0; n < 20000; n++) apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
