// End-to-end testbench for hs_adders_top at its default sizes (32-bit
// filter, 8-bit comparators, 16-bit adders).
//
// Every clock cycle it applies a new filter sample and new random operands
// to both comparators and all five adders, and checks every output against
// independent models: integer arithmetic for the adders and the filter,
// relational operators for the comparators. It counts how often each
// mechanism of the design happened and fails if one never did: filter
// wrap-around, the filter's reset in mid-run, each comparator outcome
// (greater, less, equal), a signed comparison whose subtraction overflows,
// and a carry in and a carry out on every adder.
module hs_adders_top_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst;

  logic [31:0] flt_x, flt_y;
  logic [7:0]  cu_a, cu_b, cs_a, cs_b;
  logic        cu_agtb, cu_altb, cu_equal, cs_agtb, cs_altb, cs_equal;
  logic [15:0] ad_a [5], ad_b [5], ad_s [5];
  logic        ad_ci [5], ad_co [5];

  hs_adders_top dut (
    .clk(clk), .rst(rst), .flt_x(flt_x), .flt_y(flt_y),
    .cu_a(cu_a), .cu_b(cu_b), .cu_agtb(cu_agtb), .cu_altb(cu_altb), .cu_equal(cu_equal),
    .cs_a(cs_a), .cs_b(cs_b), .cs_agtb(cs_agtb), .cs_altb(cs_altb), .cs_equal(cs_equal),
    .ks_a(ad_a[0]), .ks_b(ad_b[0]), .ks_cin(ad_ci[0]), .ks_sum(ad_s[0]), .ks_cout(ad_co[0]),
    .bk_a(ad_a[1]), .bk_b(ad_b[1]), .bk_cin(ad_ci[1]), .bk_sum(ad_s[1]), .bk_cout(ad_co[1]),
    .sk_a(ad_a[2]), .sk_b(ad_b[2]), .sk_cin(ad_ci[2]), .sk_sum(ad_s[2]), .sk_cout(ad_co[2]),
    .hc_a(ad_a[3]), .hc_b(ad_b[3]), .hc_cin(ad_ci[3]), .hc_sum(ad_s[3]), .hc_cout(ad_co[3]),
    .ln_a(ad_a[4]), .ln_b(ad_b[4]), .ln_cin(ad_ci[4]), .ln_sum(ad_s[4]), .ln_cout(ad_co[4])
  );

  always #5 clk = ~clk;

  // mechanism counters
  int n_wrap = 0, n_reset = 0, n_gt = 0, n_lt = 0, n_eq = 0, n_sovf = 0;
  int n_cin [5], n_cout [5];
  int m_s1 = 0, m_s2 = 0, m_s3 = 0;

  function automatic int filt_model(input int xi, output bit wrapped);
    int f1, f2, f3, g1, g2, g3;
    longint l1, l2, l3;
    l1 = longint'(xi) - m_s1; f1 = int'(l1);
    l2 = longint'(f1) - m_s2; f2 = int'(l2);
    l3 = longint'(f2) - m_s3; f3 = int'(l3);
    wrapped = (l1 != f1) || (l2 != f2) || (l3 != f3);
    g1 = (f1 >>> 1) + m_s1; g2 = (f2 >>> 1) + m_s2; g3 = (f3 >>> 1) + m_s3;
    m_s1 = g2; m_s2 = g3; m_s3 = f3;
    return (g1 >>> 1) + (g2 >>> 1) + (g3 >>> 1) + (f3 >>> 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycle(input int xi, input bit do_rst);
    int ey; bit w;
    int ia, ib;
    flt_x = xi; rst = do_rst;
    // comparators: mostly random, sometimes equal
    cu_a = 8'($urandom); cu_b = ($urandom % 8 == 0) ? cu_a : 8'($urandom);
    cs_a = 8'($urandom); cs_b = ($urandom % 8 == 0) ? cs_a : 8'($urandom);
    for (int k = 0; k < 5; k++) begin
      ad_a[k] = 16'($urandom); ad_b[k] = 16'($urandom); ad_ci[k] = 1'($urandom);
    end
    #1;
    if (do_rst) begin
      m_s1 = 0; m_s2 = 0; m_s3 = 0;
    end else begin
      ey = filt_model(xi, w);
      if (w) n_wrap++;
      check(flt_y == ey, "filter");
    end
    check({cu_agtb, cu_altb, cu_equal} == {cu_a > cu_b, cu_a < cu_b, cu_a == cu_b}, "unsigned comparator");
    ia = int'($signed(cs_a)); ib = int'($signed(cs_b));
    check({cs_agtb, cs_altb, cs_equal} == {ia > ib, ia < ib, ia == ib}, "signed comparator");
    if (cu_a > cu_b) n_gt++; else if (cu_a < cu_b) n_lt++; else n_eq++;
    if (ib - ia > 127 || ib - ia < -128) n_sovf++;
    for (int k = 0; k < 5; k++) begin
      check({ad_co[k], ad_s[k]} == {1'b0, ad_a[k]} + {1'b0, ad_b[k]} + 17'(ad_ci[k]), "adder");
      if (ad_ci[k]) n_cin[k]++;
      if (ad_co[k]) n_cout[k]++;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) begin n_cin[k] = 0; n_cout[k] = 0; end
    flt_x = '0; rst = 1'b1;
    @(posedge clk); #1;
    cycle(0, 1'b1);
    for (int n = 0; n < 400; n++) cycle(int'($rtoi(50000.0 * $sin(2.0 * 3.14159265 * n / 25.0))), 1'b0);
    for (int n = 0; n < 1000; n++) cycle(int'($urandom), 1'b0);
    cycle(0, 1'b1); n_reset++;
    for (int n = 0; n < 1000; n++) cycle(int'($urandom), 1'b0);

    $display("filter wraps=%0d resets=%0d; comparator gt=%0d lt=%0d eq=%0d signed-overflow=%0d",
             n_wrap, n_reset, n_gt, n_lt, n_eq, n_sovf);
    check(n_wrap > 0, "filter wrap-around never happened");
    check(n_reset > 0, "mid-run reset never happened");
    check(n_gt > 0 && n_lt > 0 && n_eq > 0, "a comparator outcome never happened");
    check(n_sovf > 0, "signed overflow never happened");
    for (int k = 0; k < 5; k++) begin
      $display("adder %0d: carry-in %0d times, carry-out %0d times", k, n_cin[k], n_cout[k]);
      check(n_cin[k] > 0 && n_cout[k] > 0, "adder carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
