// ppa16_structure_d: 16-bit five-level prefix adder, Structure D.
//
// It instantiates prefix_adder with N=16 and the source-column matrix ppa_pkg::STRUCT_D_SRC, so
// s = a + b + cin through a prefix network of 5 levels and 39 prefix nodes. Columns 13,12 and
// 5,4 build 13:8, 12:7, 5:0 and 4:0 early in two extra levels, so the fourth level can form 7:0
// and 6:0 together with 15:8 and 14:7, and the last level closes the upper byte from 7:0 and
// 6:0 alternately. The structure follows the diagram in the original report.
// Purely combinational.
module ppa16_structure_d (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout
);

  prefix_adder #(.N(16), .M(5), .SRC(ppa_pkg::STRUCT_D_SRC)) u_adder (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .s    (s),
    .cout (cout)
  );

endmodule
