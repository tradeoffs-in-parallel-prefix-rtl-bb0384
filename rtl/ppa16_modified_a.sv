// ppa16_modified_a: 16-bit minimum-depth prefix adder, modified Structure A.
//
// It instantiates prefix_adder with N=16 and the source-column matrix
// ppa_pkg::STRUCT_MOD_A_SRC, so
// s = a + b + cin through a prefix network of 4 levels and 39 prefix nodes. It is Structure A
// with the nodes that form 5:0 and 4:0 moved from the third to the fourth level, so the source
// 3:0 and 2:0 each drive fewer nodes in the third level and the branch effort on the critical
// path drops. The structure follows the diagram in the original report.
// Purely combinational.
module ppa16_modified_a (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout
);

  prefix_adder #(.N(16), .M(4), .SRC(ppa_pkg::STRUCT_MOD_A_SRC)) u_adder (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .s    (s),
    .cout (cout)
  );

endmodule
