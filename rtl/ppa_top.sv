// ppa_top: the proposed parallel prefix adders side by side.
//
// The adders are alternatives for the same job, so the top gives them common operands and
// brings out every result. One 16-bit operand pair (a16, b16, cin16) drives the five 16-bit
// structures: Structure A, modified Structure A, Structure C, Structure D and the modified
// Ladner-Fischer adder. One 8-bit operand pair (a8, b8, cin8) drives all eighteen 8-bit
// structures of the search result; their sums and carries come out as arrays indexed by
// ppa_pkg::ppa8_e. Every output equals the operands' sum, so the top is useful to compare the
// structures after synthesis and as a single place to check them all. Purely combinational.
// Sharing the operands between structures is this design's choice; the structures follow the
// original report.
module ppa_top (
  input  logic [15:0] a16,
  input  logic [15:0] b16,
  input  logic        cin16,
  output logic [15:0] sum_struct_a,
  output logic        cout_struct_a,
  output logic [15:0] sum_mod_a,
  output logic        cout_mod_a,
  output logic [15:0] sum_struct_c,
  output logic        cout_struct_c,
  output logic [15:0] sum_struct_d,
  output logic        cout_struct_d,
  output logic [15:0] sum_mod_lf,
  output logic        cout_mod_lf,

  input  logic [7:0]                           a8,
  input  logic [7:0]                           b8,
  input  logic                                 cin8,
  output logic [ppa_pkg::PPA8_COUNT-1:0][7:0]  sum8,
  output logic [ppa_pkg::PPA8_COUNT-1:0]       cout8
);

  ppa16_structure_a u_struct_a (
    .a (a16), .b (b16), .cin (cin16), .s (sum_struct_a), .cout (cout_struct_a)
  );

  ppa16_modified_a u_mod_a (
    .a (a16), .b (b16), .cin (cin16), .s (sum_mod_a), .cout (cout_mod_a)
  );

  ppa16_structure_c u_struct_c (
    .a (a16), .b (b16), .cin (cin16), .s (sum_struct_c), .cout (cout_struct_c)
  );

  ppa16_structure_d u_struct_d (
    .a (a16), .b (b16), .cin (cin16), .s (sum_struct_d), .cout (cout_struct_d)
  );

  ppa16_modified_lf u_mod_lf (
    .a (a16), .b (b16), .cin (cin16), .s (sum_mod_lf), .cout (cout_mod_lf)
  );

  for (genvar k = 0; k < ppa_pkg::PPA8_COUNT; k++) begin : g_ppa8
    ppa8_found #(.SEL(ppa_pkg::ppa8_e'(k))) u_ppa8 (
      .a (a8), .b (b8), .cin (cin8), .s (sum8[k]), .cout (cout8[k])
    );
  end

endmodule
