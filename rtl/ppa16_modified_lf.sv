// ppa16_modified_lf: 16-bit minimum-depth prefix adder, modified Ladner-Fischer.
//
// It instantiates prefix_adder with N=16 and the source-column matrix
// ppa_pkg::STRUCT_MOD_LF_SRC, so s = a + b + cin through a prefix network of 4 levels and 32
// prefix nodes. Compared with the Ladner-Fischer adder, the node forming 2:0 moves down one
// level and the nodes forming 6:0, 5:0 and 4:0 move to the last level, with buffers in their
// place; the source 3:0 then drives one node in level 3 and three in level 4 instead of four
// in level 3, and the branch effort on the critical path drops. The structure follows the
// diagram in the original report.
// Purely combinational.
module ppa16_modified_lf (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout
);

  prefix_adder #(.N(16), .M(4), .SRC(ppa_pkg::STRUCT_MOD_LF_SRC)) u_adder (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .s    (s),
    .cout (cout)
  );

endmodule
