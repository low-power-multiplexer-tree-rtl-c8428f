// sl_ctrl: Single-Level Controller with resource sharing.
//
// Turns an SB-bit tree address mux_sel into the 2^SB - 1 individual selection
// signals of a MUX tree, keeping every cell that is off the addressed path at
// its previous value. Each cell has one register. The register of cell j at
// level l loads mux_sel[l] when the higher address bits mux_sel[SB-1:l+1]
// equal j, i.e. when that cell lies on the new path; otherwise a 2-to-1 MUX in
// front of the register feeds the register its own value back. The top cell's
// register loads mux_sel[SB-1] every cycle. So at most one selection signal
// per level changes per cycle.
//
// Resource sharing: the "on path" condition of a cell is built from the
// condition of its parent cell and one more address bit,
//   upd(l, j) = upd(l+1, j >> 1) & (mux_sel[l+1] == j[0]),
// so the comparison of the high bits is shared by all levels below instead of
// being repeated per register.
//
// Interface: sel_q uses the flat layout of mux_tree_pkg (cell j of level l at
// sel_offset(2^SB, l) + j). Timing: mux_sel is sampled on the rising clock
// edge; sel_q is registered, so the tree follows the address one cycle later.
// rst_n (asynchronous, active low) clears all registers, which selects input 0;
// reset is this design's own addition. An assertion checks that the on-path
// decode selects exactly one cell per level.
module sl_ctrl
  import mux_tree_pkg::*;
#(
  parameter int unsigned SB = 3    // address bits; the tree has 2^SB inputs
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SB-1:0]       mux_sel,   // tree address
  output logic [(1<<SB)-2:0]  sel_q      // registered per-cell selection
);

  localparam int unsigned M = 1 << SB;   // inputs of the controlled tree

  logic [M-2:0] sel_d;   // next register values

  // Per level: which cells lie on the path of the current address (upd), and
  // the load-or-hold multiplexer in front of every register. The on-path
  // decode of a level reuses that of the level above it.
  for (genvar l = SB - 1; l >= 0; l--) begin : g_lvl
    localparam int unsigned CELLS = M >> (l + 1);
    logic [CELLS-1:0] upd;
    for (genvar j = 0; j < CELLS; j++) begin : g_cell
      if (l == SB - 1) begin : g_top
        assign upd[j] = 1'b1;
      end else begin : g_low
        assign upd[j] = g_lvl[l + 1].upd[j >> 1] & (mux_sel[l + 1] == 1'(j & 1));
      end
      assign sel_d[sel_offset(M, l) + j] =
        upd[j] ? mux_sel[l] : sel_q[sel_offset(M, l) + j];
    end

    // Exactly one cell per level lies on the addressed path, so at most one
    // selection signal per level can change in a cycle.
    a_one_cell_on_path: assert property (@(posedge clk) $onehot(upd))
      else $error("level %0d: on-path decode is not one-hot", l);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= '0;
    else        sel_q <= sel_d;
  end

endmodule
