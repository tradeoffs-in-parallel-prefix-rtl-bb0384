// tb_prefix_adder: self-checking test of prefix_adder.
//
// Applies corner operands (zeros, all ones, a carry that must travel the full width, a carry
// started at every bit position) and 20000 random operand pairs with random carry input, and
// compares {cout, s} with the integer sum a + b + cin. It also checks the prefix network's
// shape, computed at elaboration, against counts made from the structure's diagram: 39 nodes, 4
// levels, largest fanout 4, total horizontal wire length 95 and branch effort 60 on the worst
// path from bit 0. The defaults build Structure A. A watchdog ends the run if it stalls.
module tb_prefix_adder;
  logic [15:0] a, b, s;
  logic        cin, cout;
  int checks = 0, failures = 0;

  prefix_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_vec(input logic [15:0] va, input logic [15:0] vb, input logic vc);
    logic [16:0] exp;
    a = va; b = vb; cin = vc;
    #1;
    exp = {1'b0, va} + {1'b0, vb} + {16'b0, vc};
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b: got %b_%h expected %h", va, vb, vc, cout, s, exp);
    end
  endtask

  initial begin
    expect_eq("structure valid", int'(dut.u_net.STRUCT_OK), 1);
    expect_eq("nodes", dut.u_net.NODES, 39);
    expect_eq("levels", dut.u_net.LEVELS, 4);
    expect_eq("max fanout", dut.u_net.MAX_FANOUT, 4);
    expect_eq("wire length", dut.u_net.WIRE_LENGTH, 95);
    expect_eq("branch effort", dut.u_net.BRANCH_EFFORT, 60);
    check_vec(16'h0000, 16'h0000, 1'b0);
    check_vec(16'h0000, 16'h0000, 1'b1);
    check_vec(16'hFFFF, 16'hFFFF, 1'b1);
    check_vec(16'hFFFF, 16'h0000, 1'b1);
    check_vec(16'hFFFF, 16'h0001, 1'b0);
    check_vec(16'h8000, 16'h8000, 1'b0);
    for (int k = 0; k < 16; k++) begin
      check_vec(16'hFFFF << k, 16'h0001 << k, 1'b0);   // carry born at bit k runs to cout
      check_vec(~(16'h0001 << k), 16'h0000, 1'b1);     // carry-in stops at bit k
      check_vec(16'h0001 << k, 16'h0000, 1'b0);
    end
    for (int t = 0; t < 20000; t++) check_vec(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
