// ppa16_structure_a: 16-bit minimum-depth prefix adder, Structure A.
//
// It instantiates prefix_adder with N=16 and the source-column matrix ppa_pkg::STRUCT_A_SRC, so
// s = a + b + cin through a prefix network of 4 levels and 39 prefix nodes. The first level
// joins every column with its neighbour; each later level joins a pair of neighbouring columns
// with another pair two (then four, then eight) columns lower, alternating sources so that no
// source drives more than four nodes in one level. The structure follows the source
// description's diagram.
// Purely combinational.
module ppa16_structure_a (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout
);

  prefix_adder #(.N(16), .M(4), .SRC(ppa_pkg::STRUCT_A_SRC)) u_adder (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .s    (s),
    .cout (cout)
  );

endmodule
