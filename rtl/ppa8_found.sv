// ppa8_found: one of the 8-bit prefix adders found by the exhaustive structure search.
//
// The search enumerated every prefix network of 8 bits with up to 4 levels that forms all
// groups i:0 without overlapping groups. This module builds one of the structures singled out
// from that result, chosen by SEL (see ppa_pkg::ppa8_e): nine three-level (minimum-depth)
// structures, six four-level structures in which every source feeds only one node per level,
// the four-level 10-node structure that improves on Brent-Kung, and two four-level structures
// that trade depth for a lower branch effort on the critical path. The structures follow the
// diagrams of the original report; the selection by one enum parameter is this design's.
// Purely combinational: s = a + b + cin.
module ppa8_found #(
  parameter ppa_pkg::ppa8_e SEL = ppa_pkg::S8_FO2P5_N14_1
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout
);

  typedef int unsigned src3_t [0:2][7:0];
  typedef int unsigned src4_t [0:3][7:0];

  function automatic src3_t pick3(int unsigned idx);
    return ppa_pkg::S8_3LVL_SRC[idx];
  endfunction

  function automatic src4_t pick4(int unsigned idx);
    return ppa_pkg::S8_4LVL_SRC[idx];
  endfunction

  localparam int unsigned IDX = int'(SEL);

  if (IDX < ppa_pkg::PPA8_THREE_LEVEL) begin : g_three
    localparam src3_t SRC = pick3(IDX);
    prefix_adder #(.N(8), .M(3), .SRC(SRC)) u_adder (
      .a (a), .b (b), .cin (cin), .s (s), .cout (cout)
    );
  end else begin : g_four
    localparam src4_t SRC = pick4(IDX - ppa_pkg::PPA8_THREE_LEVEL);
    prefix_adder #(.N(8), .M(4), .SRC(SRC)) u_adder (
      .a (a), .b (b), .cin (cin), .s (s), .cout (cout)
    );
  end

endmodule
