// tl_ctrl: Two-Level Controller for an N = 2^SB input MUX tree.
//
// The tree is cut at level G. The subtrees below the cut (2^(SB-G) groups of
// 2^G inputs, 2^G - 1 cells each) get one clock-gated Level-2 Controller each
// (l2_ctrl); only the group that holds the addressed input is clocked in a
// cycle. The 2^(SB-G) - 1 cells above the cut belong to the Level-1
// Controller, which follows the single-level rule on the upper address bits
// mux_sel[SB-1:G] and runs on the free clock. Per cycle, therefore, the
// registers written are the Level-1 ones plus the 2^G - 1 of one group, instead
// of all 2^SB - 1, and the group logic only decodes G address bits.
//
// Groups of fewer than 7 registers are not worth gating: when
// use_clock_gating(SB, G) is false (G < 3, or no level left above the cut) the
// controller is one sl_ctrl over all SB address bits, i.e. the Single-Level
// Controller. Setting G = 0 selects that form on purpose.
//
// Interface: sel_q is the flat per-cell selection vector of mux_tree_pkg for
// the whole tree. Timing: registered, one cycle after mux_sel. rst_n is
// asynchronous, active low, and clears every register (input 0 selected).
module tl_ctrl
  import mux_tree_pkg::*;
#(
  parameter int unsigned SB = 8,   // address bits; the tree has 2^SB inputs
  parameter int unsigned G  = 5    // address bits per clock-gated group
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SB-1:0]       mux_sel,
  output logic [(1<<SB)-2:0]  sel_q
);

  localparam int unsigned N = 1 << SB;

  if (use_clock_gating(SB, G)) begin : g_two_level
    localparam int unsigned HB     = SB - G;     // Level-1 address bits
    localparam int unsigned GROUPS = 1 << HB;
    localparam int unsigned GN     = 1 << G;     // inputs per group

    // Level-1 Controller: cells of tree levels G .. SB-1.
    logic [GROUPS-2:0] l1_q;

    sl_ctrl #(.SB(HB)) u_level1 (
      .clk     (clk),
      .rst_n   (rst_n),
      .mux_sel (mux_sel[SB-1:G]),
      .sel_q   (l1_q)
    );

    for (genvar k = 0; k < HB; k++) begin : g_l1_lvl
      for (genvar j = 0; j < (GROUPS >> (k + 1)); j++) begin : g_cell
        assign sel_q[sel_offset(N, G + k) + j] = l1_q[sel_offset(GROUPS, k) + j];
      end
    end

    // Level-2 Controllers: cells of tree levels 0 .. G-1, one group each.
    for (genvar g = 0; g < GROUPS; g++) begin : g_group
      logic [GN-2:0] l2_q;

      l2_ctrl #(.G(G), .HB(HB), .GROUP(g)) u_level2 (
        .clk        (clk),
        .rst_n      (rst_n),
        .mux_sel_hi (mux_sel[SB-1:G]),
        .mux_sel_lo (mux_sel[G-1:0]),
        .sel_q      (l2_q)
      );

      for (genvar l = 0; l < G; l++) begin : g_lvl
        localparam int unsigned CELLS = GN >> (l + 1);
        for (genvar j = 0; j < CELLS; j++) begin : g_cell
          assign sel_q[sel_offset(N, l) + g * CELLS + j] = l2_q[sel_offset(GN, l) + j];
        end
      end
    end
  end else begin : g_single_level
    sl_ctrl #(.SB(SB)) u_single (
      .clk     (clk),
      .rst_n   (rst_n),
      .mux_sel (mux_sel),
      .sel_q   (sel_q)
    );
  end

endmodule
