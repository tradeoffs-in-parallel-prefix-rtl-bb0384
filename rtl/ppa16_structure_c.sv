// ppa16_structure_c: 16-bit minimum-complexity prefix adder, Structure C.
//
// It instantiates prefix_adder with N=16 and the source-column matrix ppa_pkg::STRUCT_C_SRC, so
// s = a + b + cin through a prefix network of 6 levels and 25 prefix nodes. It is a Brent-Kung
// adder in which column 15 joins 15:12 with 11:0 directly, saving the node that would form
// 15:8. The structure follows the diagram in the original report, which draws it in six rows.
// Purely combinational.
module ppa16_structure_c (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout
);

  prefix_adder #(.N(16), .M(6), .SRC(ppa_pkg::STRUCT_C_SRC)) u_adder (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .s    (s),
    .cout (cout)
  );

endmodule
