// tb_prefix_network: self-checking test of the matrix-built prefix computation stage.
//
// Two networks are tested: the default one (Structure A, 16 bits) and the 16-bit modified
// Ladner-Fischer. Random level-0 generate/propagate vectors, including ones with g and p both
// set, are applied and every output group i:0 is compared with a serial scan from bit 0 up (G =
// g_j | p_j & G, P = p_j & P). The netlist figures computed at elaboration are checked against
// counts made from the structure diagrams: Structure A has 39 nodes in 4 levels and a largest
// fanout of 4; the modified Ladner-Fischer has 32 nodes, 4 levels and a total horizontal wire
// length of 76. Their branch efforts on the worst path from bit 0 are 60 and 72. A watchdog
// ends the run if it stalls.
module tb_prefix_network;
  localparam int N = 16;
  logic [N-1:0] g, p;
  logic [N-1:0] ga, pa, gl, pl;
  int checks = 0, failures = 0;

  prefix_network dut_a (.g_in(g), .p_in(p), .grp_g(ga), .grp_p(pa));
  prefix_network #(.N(16), .M(4), .SRC(ppa_pkg::STRUCT_MOD_LF_SRC)) dut_lf (
    .g_in(g), .p_in(p), .grp_g(gl), .grp_p(pl));

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_vec(input logic [N-1:0] vg, input logic [N-1:0] vp);
    logic G, P;
    g = vg; p = vp;
    #1;
    G = 1'b0; P = 1'b1;
    for (int i = 0; i < N; i++) begin
      G = vg[i] | (vp[i] & G);
      P = vp[i] & P;
      checks++;
      if (ga[i] !== G || pa[i] !== P || gl[i] !== G || pl[i] !== P) begin
        failures++;
        if (failures < 10)
          $display("FAIL g=%h p=%h col %0d: A %b%b LF %b%b exp %b%b", vg, vp, i,
                   ga[i], pa[i], gl[i], pl[i], G, P);
      end
    end
  endtask

  initial begin
    expect_eq("A ok", int'(dut_a.STRUCT_OK), 1);
    expect_eq("A nodes", dut_a.NODES, 39);
    expect_eq("A levels", dut_a.LEVELS, 4);
    expect_eq("A max fanout", dut_a.MAX_FANOUT, 4);
    expect_eq("A branch effort", dut_a.BRANCH_EFFORT, 60);
    expect_eq("LF ok", int'(dut_lf.STRUCT_OK), 1);
    expect_eq("LF nodes", dut_lf.NODES, 32);
    expect_eq("LF levels", dut_lf.LEVELS, 4);
    expect_eq("LF wire length", dut_lf.WIRE_LENGTH, 76);
    expect_eq("LF branch effort", dut_lf.BRANCH_EFFORT, 72);
    check_vec('0, '1);
    check_vec(16'h0001, 16'hFFFE);
    check_vec(16'h0000, 16'hFFFF);
    for (int k = 0; k < N; k++) check_vec(N'(1) << k, ~(N'(1) << k));
    for (int t = 0; t < 5000; t++) check_vec(N'($urandom), N'($urandom) | N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
