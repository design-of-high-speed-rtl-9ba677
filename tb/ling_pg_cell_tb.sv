// Self-checking testbench for ling_pg_cell: all sixteen input combinations,
// compared with G* = g_i + g_(i-1) and P* = p_i . p_(i-1).
module ling_pg_cell_tb;
  int checks = 0, failures = 0;
  logic g_i, g_im1, p_i, p_im1, gs, ps;
  ling_pg_cell dut (.g_i(g_i), .g_im1(g_im1), .p_i(p_i), .p_im1(p_im1), .gs(gs), .ps(ps));
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      {g_i, g_im1, p_i, p_im1} = 4'(v); #1;
      checks++;
      if (gs !== (v[3] || v[2]) || ps !== (v[1] && v[0])) begin
        failures++; $display("FAIL %b -> %b %b", 4'(v), gs, ps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
