// Self-checking testbench for lattice_filter at its default 32-bit width.
//
// A reference model in plain integer arithmetic (32-bit int, wrapping like
// the hardware, halving by an arithmetic shift) runs alongside the filter;
// y is compared with it in every cycle before the clock edge, so the
// zero-cycle input-to-output path and the one-cycle delays are both checked.
// Stimulus: an impulse, a sampled sine wave (the test input of the filter
// structure), random full-range samples that make the sums wrap, and a reset
// in the middle of the run. The testbench counts how often wrap-around and
// the mid-run reset happened and fails if either never did.
module lattice_filter_tb;
  int checks = 0, failures = 0;
  int wraps = 0, resets = 0;
  logic clk = 1'b0, rst;
  logic [31:0] x, y;
  int m_s1, m_s2, m_s3;          // model state

  lattice_filter dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  // one step of the reference model; returns y and the next state
  function automatic int model(input int xi, inout int s1, inout int s2, inout int s3,
                               output bit wrapped);
    int f1, f2, f3, g1, g2, g3, yo;
    longint lf1, lf2, lf3;
    lf1 = longint'(xi) - s1;  f1 = int'(lf1);
    lf2 = longint'(f1) - s2;  f2 = int'(lf2);
    lf3 = longint'(f2) - s3;  f3 = int'(lf3);
    wrapped = (lf1 != f1) || (lf2 != f2) || (lf3 != f3);
    g1 = (f1 >>> 1) + s1;
    g2 = (f2 >>> 1) + s2;
    g3 = (f3 >>> 1) + s3;
    yo = (g1 >>> 1) + (g2 >>> 1) + (g3 >>> 1) + (f3 >>> 1);
    s1 = g2; s2 = g3; s3 = f3;
    return yo;
  endfunction

  task automatic step(input int xi, input bit do_rst);
    int exp_y; bit w;
    x = xi; rst = do_rst;
    #1;
    if (!do_rst) begin
      exp_y = model(xi, m_s1, m_s2, m_s3, w);
      if (w) wraps++;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t x=%0d y=%0d want %0d", $time, xi, $signed(y), exp_y);
      end
    end else begin
      m_s1 = 0; m_s2 = 0; m_s3 = 0;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    x = '0; rst = 1'b1;
    @(posedge clk); #1;
    step(0, 1'b1);
    step(1 << 20, 1'b0);                       // impulse
    for (int n = 0; n < 30; n++) step(0, 1'b0);
    for (int n = 0; n < 500; n++) step(int'($rtoi(100000.0 * $sin(2.0 * 3.14159265 * n / 40.0))), 1'b0);
    for (int n = 0; n < 2000; n++) step(int'($urandom), 1'b0);
    step(0, 1'b1); resets++;                  // reset in the middle of the run
    step(12345, 1'b0);
    for (int n = 0; n < 2000; n++) step(int'($urandom), 1'b0);
    $display("wrap-around steps: %0d, mid-run resets: %0d", wraps, resets);
    checks += 2;
    if (wraps == 0) failures++;
    if (resets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
