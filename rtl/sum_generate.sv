// sum_generate: post-processing stage of a parallel prefix adder.
//
// From the group signals i:0 of the prefix network and the carry input it forms the carry
// into each column, c_0 = cin and c_i = g_{i-1:0} | (p_{i-1:0} & cin), and the sum bits
// s_i = p_i ^ c_i, where p_i is the bit propagate of the pre-processing stage. The carry out
// is c_N. Purely combinational, one level of logic after the prefix network. The carry and
// sum equations are those of the original report; bringing out c_N as cout is this
// design's choice.
module sum_generate #(
  parameter int N = 16
) (
  input  logic [N-1:0] p,      // bit propagate a_i ^ b_i
  input  logic [N-1:0] grp_g,  // group generate i:0
  input  logic [N-1:0] grp_p,  // group propagate i:0
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] c;

  always_comb begin
    c[0] = cin;
    for (int i = 1; i <= N; i++) begin
      c[i] = grp_g[i-1] | (grp_p[i-1] & cin);
    end
    s    = p ^ c[N-1:0];
    cout = c[N];
  end

endmodule
