// tb_sum_generate: self-checking test of the post-processing stage.
//
// The group signals i:0 are formed in the testbench by a serial scan of the bit
// generate/propagate of random operands, and fed with the bit propagate and a carry input
// into a 16-bit sum_generate. Its {cout, s} must equal the integer sum a + b + cin.
// A watchdog ends the run if it stalls.
module tb_sum_generate;
  localparam int N = 16;
  logic [N-1:0] p, gg, gp, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  sum_generate #(.N(N)) dut (.p(p), .grp_g(gg), .grp_p(gp), .cin(cin), .s(s), .cout(cout));

  task automatic check_vec(input logic [N-1:0] a, input logic [N-1:0] b, input logic c);
    logic G, P;
    logic [N:0] exp;
    G = 1'b0; P = 1'b1;
    for (int i = 0; i < N; i++) begin
      G = (a[i] & b[i]) | ((a[i] ^ b[i]) & G);
      P = (a[i] ^ b[i]) & P;
      gg[i] = G;
      gp[i] = P;
    end
    p = a ^ b;
    cin = c;
    #1;
    exp = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, c};
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", a, b, c, cout, s, exp);
    end
  endtask

  initial begin
    check_vec('0, '0, 1'b0);
    check_vec('1, '0, 1'b1);
    check_vec('1, '1, 1'b1);
    check_vec(16'h0001, 16'hFFFF, 1'b0);
    for (int t = 0; t < 5000; t++) check_vec(N'($urandom), N'($urandom), 1'($urandom));
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
