// ppa_pkg -- shared types and the prefix-graph description of the hybrid
// parallel prefix adder.
//
// The carry network is described here once, as constant functions, and is
// elaborated by ppa_prefix_tree. The graph is the 32-bit hybrid prefix graph
// (4-bit groups whose group carries step one stage per group along the
// diagonal) generalised to any width N that is a multiple of 4 and at least
// 8. For N = 32 it has 23 dot nodes, 31 semi-dot nodes and a logic depth of
// 9. The generalisation to other widths is this design's own.
//
// Stage numbering: stage 0 is pre-processing, stages 1..depth(n) hold the
// prefix nodes. Every value produced in an even stage (stage 0 included) is
// active low; every value produced in an odd stage is active high. A node in
// stage s expects inputs in the polarity of stage s-1, so an edge that joins
// stages an even distance apart needs an inverter pair.
package ppa_pkg;

  // Pre-processing / signal-set scheme.
  //   SCHEME_I   : (G-bar, P-bar) from NAND and XNOR
  //   SCHEME_II  : (G-bar, K) from NAND and NOR; P-bar from XNOR for the sum
  //   SCHEME_III : (G-bar, K) from NAND and NOR; P = NOR(K, G) for the sum
  typedef enum int {
    SCHEME_I   = 1,
    SCHEME_II  = 2,
    SCHEME_III = 3
  } scheme_e;

  typedef enum int {
    NODE_NONE = 0,
    NODE_DOT  = 1,   // group (G, P) = hi . lo
    NODE_SEMI = 2    // carry G[i:0] = hi . carry
  } node_kind_e;

  // One prefix node: its kind, the stage its upper (same-column) input comes
  // from, and the stage and column of its lower input.
  typedef struct packed {
    node_kind_e kind;
    int         hi_stage;
    int         lo_stage;
    int         lo_col;
  } node_t;

  // Legal widths: multiples of 4, at least 8.
  function automatic bit width_ok(int n);
    return (n >= 8) && (n % 4 == 0);
  endfunction

  // Number of prefix stages (logic depth of the carry network).
  function automatic int depth(int n);
    return n / 4 + 1;
  endfunction

  // Node at stage s (1..depth), column i (0..n-1).
  function automatic node_t node(int n, int s, int i);
    node_t nd;
    int k, r, b;
    bit last;
    nd = '{kind: NODE_NONE, hi_stage: 0, lo_stage: 0, lo_col: 0};
    k    = i / 4;
    r    = i % 4;
    b    = 4 * k;
    last = (k == n / 4 - 1);
    if (k == 0) begin
      // First group: c1 in stage 1, (3:2) in stage 1, c3 and c2 in stage 2.
      if (s == 1 && r == 1) nd = '{NODE_SEMI, 0, 0, 0};
      if (s == 1 && r == 3) nd = '{NODE_DOT,  0, 0, 2};
      if (s == 2 && r == 3) nd = '{NODE_SEMI, 1, 1, 1};
      if (s == 2 && r == 2) nd = '{NODE_SEMI, 0, 1, 1};
    end else begin
      // Group terms: pairs in stage 1, the 4-bit group in stage 2.
      if (s == 1 && r == 1) nd = '{NODE_DOT, 0, 0, b};
      if (s == 1 && r == 3) nd = '{NODE_DOT, 0, 0, b + 2};
      if (s == 2 && r == 3) nd = '{NODE_DOT, 1, 1, b + 1};
      if (s == 2 && r == 2 && last) nd = '{NODE_DOT, 0, 1, b + 1};
      // Carries from the previous group's carry c(b-1), made in stage k+1.
      if (s == k + 2 && r == 3) nd = '{NODE_SEMI, 2, k + 1, b - 1};
      if (s == k + 2 && r == 1) nd = '{NODE_SEMI, 1, k + 1, b - 1};
      if (s == k + 2 && r == 0) nd = '{NODE_SEMI, 0, k + 1, b - 1};
      if (s == k + 2 && r == 2 && last) nd = '{NODE_SEMI, 2, k + 1, b - 1};
      // Inner groups finish bit b+2 one stage later from c(b+1).
      if (s == k + 3 && r == 2 && !last) nd = '{NODE_SEMI, 0, k + 2, b + 1};
    end
    return nd;
  endfunction

  // Stage in which the final carry c_i = G[i:0] is produced (0 for c0 = G0).
  function automatic int carry_stage(int n, int i);
    int cs;
    cs = 0;
    for (int s = 1; s <= depth(n); s++)
      if (node(n, s, i).kind == NODE_SEMI) cs = s;
    return cs;
  endfunction

  // True when carry c_i leaves the network complemented (even stage).
  function automatic bit carry_active_low(int n, int i);
    return (carry_stage(n, i) % 2) == 0;
  endfunction

  // True when the node's upper or lower input edge needs an inverter pair.
  function automatic bit hi_needs_inv(int n, int s, int i);
    return ((s - node(n, s, i).hi_stage) % 2) == 0;
  endfunction

  function automatic bit lo_needs_inv(int n, int s, int i);
    return ((s - node(n, s, i).lo_stage) % 2) == 0;
  endfunction

  // Structural counts, for checking against the published node counts.
  function automatic int count_nodes(int n, node_kind_e kind);
    int cnt;
    cnt = 0;
    for (int s = 1; s <= depth(n); s++)
      for (int i = 0; i < n; i++)
        if (node(n, s, i).kind == kind) cnt++;
    return cnt;
  endfunction

  function automatic int count_inv_pairs(int n);
    int cnt;
    cnt = 0;
    for (int s = 1; s <= depth(n); s++)
      for (int i = 0; i < n; i++)
        if (node(n, s, i).kind != NODE_NONE) begin
          if (hi_needs_inv(n, s, i)) cnt++;
          if (lo_needs_inv(n, s, i)) cnt++;
        end
    return cnt;
  endfunction

endpackage
