// tb_gp_generate: self-checking test of the pre-processing stage.
//
// Drives random and corner operand pairs into a 16-bit gp_generate and checks every bit
// against a half adder worked out with integer addition: the carry of a_i + b_i is the
// generate, its sum bit the propagate. A watchdog ends the run if it stalls.
module tb_gp_generate;
  localparam int N = 16;
  logic [N-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  gp_generate #(.N(N)) dut (.a(a), .b(b), .g(g), .p(p));

  task automatic check_vec(input logic [N-1:0] va, input logic [N-1:0] vb);
    a = va; b = vb;
    #1;
    for (int i = 0; i < N; i++) begin
      int unsigned hs;
      hs = int'(va[i]) + int'(vb[i]);
      checks++;
      if (g[i] !== hs[1] || p[i] !== hs[0]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h bit %0d g=%b p=%b", va, vb, i, g[i], p[i]);
      end
    end
  endtask

  initial begin
    check_vec('0, '0);
    check_vec('1, '1);
    check_vec('1, '0);
    check_vec(16'hAAAA, 16'h5555);
    check_vec(16'hAAAA, 16'hAAAA);
    for (int t = 0; t < 2000; t++) check_vec(N'($urandom), N'($urandom));
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
