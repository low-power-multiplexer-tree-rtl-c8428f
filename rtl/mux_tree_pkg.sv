// mux_tree_pkg: constants and index helpers shared by the low-power MUX tree.
//
// A binary MUX tree with N inputs (N a power of two) has S = log2(N) levels of
// 2-to-1 MUX cells. Level 0 is next to the inputs and has N/2 cells; level l
// has N >> (l+1) cells; level S-1 is the single output cell. The N-1 cell
// selection signals are kept in one flat vector, level by level from level 0
// upward, so cell j of level l sits at bit sel_offset(N, l) + j. The same
// layout is used for the data nodes of the tree (see mux_tree_indep).
//
// default_group_bits() gives the size of the clock-gated register groups of
// the Two-Level Controller. A group covers a subtree of 2^G inputs and holds
// 2^G - 1 selection registers. Following the sizing rule of the design,
// 2^G - 1 = 2^(S-2) - 1 for N < 256 (four groups) and 2^(S-3) - 1 for N = 256
// (eight groups). Sizes above 256 are not covered by that rule; they are given
// eight groups here as well. Groups of fewer than MIN_CG_REGS registers are not
// clock gated: the controller then falls back to a single-level controller.
package mux_tree_pkg;

  // Smallest register group for which clock gating pays off (7 registers).
  localparam int unsigned MIN_CG_REGS = 7;

  // Index of the first cell of level lvl in the flat selection vector of an
  // n-input tree: n/2 + n/4 + ... over the levels below lvl.
  function automatic int unsigned sel_offset(int unsigned n, int unsigned lvl);
    return n - (n >> lvl);
  endfunction

  // Group size G (selection bits handled by one Level-2 Controller).
  function automatic int unsigned default_group_bits(int unsigned n);
    int unsigned s;
    s = $clog2(n);
    if (s < 3) return 0;
    return (n >= 256) ? s - 3 : s - 2;
  endfunction

  // True when a group of g selection bits is large enough to be clock gated
  // and leaves at least one level for the Level-1 Controller.
  function automatic bit use_clock_gating(int unsigned s, int unsigned g);
    return (g < s) && (((1 << g) - 1) >= MIN_CG_REGS);
  endfunction

endpackage
