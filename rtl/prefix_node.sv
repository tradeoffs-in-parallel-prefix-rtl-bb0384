// prefix_node: the prefix operator, one node of a prefix network.
//
// It joins the group signals of a high group i:k (g_hi, p_hi) with those of a lower group
// k-1:j (g_lo, p_lo) into the group i:j:
//   g = g_hi | (p_hi & g_lo)     the group generates if the high part generates, or the high
//                                part propagates a carry that the low part generates
//   p = p_hi & p_lo              the group propagates only if both parts propagate
// The operator is associative, and idempotent, so the low group may also overlap the high
// one. Purely combinational, one level of logic. The equations follow the original report.
module prefix_node (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);

  always_comb begin
    g = g_hi | (p_hi & g_lo);
    p = p_hi & p_lo;
  end

endmodule
