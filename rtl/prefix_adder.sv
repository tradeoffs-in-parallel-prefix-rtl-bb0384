// prefix_adder: N-bit parallel prefix adder whose carry network is given as a matrix.
//
// Three stages: gp_generate forms bit generate and propagate, prefix_network combines them
// over M levels into the group signals i:0 following the source-column matrix SRC (see
// ppa_pkg for the encoding), and sum_generate forms the carries and sum bits, including the
// carry input. The result is s = a + b + cin with carry out cout. Purely combinational:
// one level for the pre-processing, M prefix levels and one level for the sum. The three-stage
// split and the matrix encoding follow the original report; the defaults (N=16, M=4 and
// Structure A) pick the first of the 16-bit structures it proposes.
module prefix_adder #(
  parameter int          N = 16,
  parameter int          M = 4,
  parameter int unsigned SRC [0:M-1][N-1:0] = ppa_pkg::STRUCT_A_SRC
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0] g, p;
  logic [N-1:0] grp_g, grp_p;

  gp_generate #(.N(N)) u_pre (
    .a (a),
    .b (b),
    .g (g),
    .p (p)
  );

  prefix_network #(.N(N), .M(M), .SRC(SRC)) u_net (
    .g_in  (g),
    .p_in  (p),
    .grp_g (grp_g),
    .grp_p (grp_p)
  );

  sum_generate #(.N(N)) u_post (
    .p     (p),
    .grp_g (grp_g),
    .grp_p (grp_p),
    .cin   (cin),
    .s     (s),
    .cout  (cout)
  );

endmodule
