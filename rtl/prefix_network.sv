// prefix_network: the prefix computation stage, built from a source-column matrix.
//
// The network has M levels (rows). Level r+1 takes the N group-signal pairs of level r; for
// bit column i the matrix entry k = SRC[r][i] says where column i gets its second operand:
//   k == i : column i passes its pair down unchanged (a buffer, no logic)
//   k <  i : a prefix_node joins column i's group (high part) with column k's (low part)
// Level 0 is the bit generate/propagate of the pre-processing stage; the outputs are the pairs
// after level M, which must be the groups i:0 for every column. The matrix encoding, with rows
// running from the MSB column on the left, is the one of the original report.
//
// At elaboration the matrix is checked by tracking the low end of every column's group: a node
// is legal only if the low group ends at or above the high group's low end minus one (no gap)
// and starts below it, and after the last level every group must reach bit 0. An illegal matrix
// stops elaboration with a fatal error. The node count, total horizontal wire length (sum of
// i-k over all nodes), largest fanout of one source within a level and the branch effort of the
// worst path from bit 0 are computed as localparams for comparison with published figures; they
// describe the netlist and do not change it. Purely combinational: M levels of prefix_node
// logic.
module prefix_network #(
  parameter int          N = 16,
  parameter int          M = 4,
  parameter int unsigned SRC [0:M-1][N-1:0] = ppa_pkg::STRUCT_A_SRC
) (
  input  logic [N-1:0] g_in,    // level-0 generate (bit generate)
  input  logic [N-1:0] p_in,    // level-0 propagate (bit propagate)
  output logic [N-1:0] grp_g,   // group generate i:0
  output logic [N-1:0] grp_p    // group propagate i:0
);

  // ---------------------------------------------------------------------------------------
  // Elaboration-time analysis of the matrix
  // ---------------------------------------------------------------------------------------
  function automatic bit structure_ok();
    int unsigned lo [N];
    int unsigned nlo [N];
    for (int i = 0; i < N; i++) lo[i] = i;
    for (int r = 0; r < M; r++) begin
      for (int i = 0; i < N; i++) begin
        int unsigned k;
        k = SRC[r][i];
        if (k == i) begin
          nlo[i] = lo[i];
        end else if (k > i || k + 1 < lo[i] || lo[k] >= lo[i]) begin
          return 1'b0;
        end else begin
          nlo[i] = lo[k];
        end
      end
      lo = nlo;
    end
    for (int i = 0; i < N; i++) if (lo[i] != 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int count_nodes();
    int n = 0;
    for (int r = 0; r < M; r++)
      for (int i = 0; i < N; i++)
        if (SRC[r][i] != i) n++;
    return n;
  endfunction

  function automatic int count_wire_length();
    int w = 0;
    for (int r = 0; r < M; r++)
      for (int i = 0; i < N; i++)
        if (SRC[r][i] != i) w += i - int'(SRC[r][i]);
    return w;
  endfunction

  function automatic int count_max_fanout();
    int f = 0;
    for (int r = 0; r < M; r++)
      for (int k = 0; k < N; k++) begin
        int n = 0;
        for (int i = 0; i < N; i++)
          if (i != k && SRC[r][i] == k) n++;
        if (n > f) f = n;
      end
    return f;
  endfunction

  // Branch effort of the worst path from the column-0 input: the product, over the levels the
  // path crosses, of the branches leaving the point it passes (the vertical one plus one per
  // node fed in other columns). A logical-effort delay estimate is
  // LEVELS * BRANCH_EFFORT^(1/LEVELS).
  function automatic int count_branch_effort();
    int best [N];
    int nb   [N];
    int fo   [N];
    for (int c = 0; c < N; c++) best[c] = (c == 0) ? 1 : 0;
    for (int r = 0; r < M; r++) begin
      for (int k = 0; k < N; k++) begin
        fo[k] = 1;
        for (int i = 0; i < N; i++)
          if (i != k && SRC[r][i] == k) fo[k]++;
      end
      for (int c = 0; c < N; c++) begin
        int unsigned k;
        nb[c] = best[c] * fo[c];
        k = SRC[r][c];
        if (k != c && best[k] * fo[k] > nb[c]) nb[c] = best[k] * fo[k];
      end
      best = nb;
    end
    begin
      int m = 0;
      for (int c = 0; c < N; c++) if (best[c] > m) m = best[c];
      return m;
    end
  endfunction

  function automatic int unsigned src_at(int r, int i);
    return SRC[r][i];
  endfunction

  localparam bit STRUCT_OK   = structure_ok();
  localparam int NODES       = count_nodes();
  localparam int LEVELS      = M;
  localparam int WIRE_LENGTH = count_wire_length();
  localparam int MAX_FANOUT  = count_max_fanout();
  localparam int BRANCH_EFFORT = count_branch_effort();

  if (!STRUCT_OK) begin : g_bad_matrix
    $fatal(1, "prefix_network: SRC does not describe a valid prefix structure");
  end

  // ---------------------------------------------------------------------------------------
  // The levels
  // ---------------------------------------------------------------------------------------
  for (genvar r = 0; r < M; r++) begin : g_level
    logic [N-1:0] g_up, p_up;   // pairs entering this level
    logic [N-1:0] g, p;         // pairs leaving this level

    if (r == 0) begin : g_first
      assign g_up = g_in;
      assign p_up = p_in;
    end else begin : g_next
      assign g_up = g_level[r-1].g;
      assign p_up = g_level[r-1].p;
    end

    for (genvar i = 0; i < N; i++) begin : g_col
      localparam int unsigned K = src_at(r, i);
      if (K == i) begin : g_buf
        assign g[i] = g_up[i];
        assign p[i] = p_up[i];
      end else begin : g_node
        prefix_node u_node (
          .g_hi (g_up[i]),
          .p_hi (p_up[i]),
          .g_lo (g_up[K]),
          .p_lo (p_up[K]),
          .g    (g[i]),
          .p    (p[i])
        );
      end
    end
  end

  assign grp_g = g_level[M-1].g;
  assign grp_p = g_level[M-1].p;

endmodule
