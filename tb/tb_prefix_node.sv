// tb_prefix_node: self-checking test of the prefix operator.
//
// Applies all sixteen input combinations and compares g and p with truth tables written out
// by hand (index {g_hi, p_hi, g_lo, p_lo}): g is 1 for indices 6, 7 and 8..15, p is 1 for
// indices 5, 7, 13 and 15. A watchdog ends the run if it stalls.
module tb_prefix_node;
  localparam logic [15:0] G_TT = 16'hFFC0;
  localparam logic [15:0] P_TT = 16'hA0A0;
  logic g_hi, p_hi, g_lo, p_lo, g, p;
  int checks = 0, failures = 0;

  prefix_node dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo), .g(g), .p(p));

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int idx = 0; idx < 16; idx++) begin
        {g_hi, p_hi, g_lo, p_lo} = 4'(idx);
        #1;
        checks++;
        if (g !== G_TT[idx] || p !== P_TT[idx]) begin
          failures++;
          $display("FAIL idx=%0d g=%b p=%b", idx, g, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
