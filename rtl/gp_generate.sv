// gp_generate: pre-processing stage of a parallel prefix adder.
//
// For every bit column i it forms the bit generate g_i = a_i & b_i (a carry leaves the column
// whatever comes in) and the bit propagate p_i = a_i ^ b_i (an incoming carry passes through).
// These are the level-0 group signals i:i of the prefix network, and p_i is reused for the
// sum. Purely combinational; N is the operand width. The equations are the standard ones of
// the original report.
module gp_generate #(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p
);

  always_comb begin
    g = a & b;
    p = a ^ b;
  end

endmodule
