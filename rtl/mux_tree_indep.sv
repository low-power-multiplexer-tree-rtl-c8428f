// mux_tree_indep: N-to-1, W-bit tree of 2-to-1 MUX cells with independent
// selection signals.
//
// Unlike a conventional tree, where all cells of one level share one selection
// bit, every one of the N-1 cells here has a selection signal of its own. This
// lets a controller leave the cells off the selected path untouched, so only
// the cells on the output propagation path switch when the selection changes.
//
// Layout: cell j of level l (level 0 next to the inputs) takes its selection
// from sel[sel_offset(N, l) + j] and chooses between nodes 2j (s = 0) and 2j+1
// (s = 1) of the level below. The data nodes use the same layout in a vector of
// 2N-1 entries: entries 0..N-1 are the inputs, entry 2N-2 is the output.
// With sel set along the path of address a (cell a >> (l+1) of each level l
// holding bit l of a), dout = din[a].
//
// Timing: purely combinational. N must be a power of two, at least 2.
// Selection 0 picking the lower-numbered input follows the original
// examples (address 000 selects input 0, 011 selects input 3); the flat
// vector layout is this design's own. Every cell is a separate mux2_cell
// instance so that a synthesis script can keep the cells from being merged.
module mux_tree_indep
  import mux_tree_pkg::*;
#(
  parameter int unsigned N = 256,  // number of inputs
  parameter int unsigned W = 128   // data width in bits
) (
  input  logic [N-2:0]        sel,   // one selection signal per cell
  input  logic [N-1:0][W-1:0] din,   // din[i] is input i
  output logic [W-1:0]        dout
);

  localparam int unsigned S = $clog2(N);

  // All data nodes: level l (l = 0 inputs, l = S output) starts at
  // 2N - (2N >> l).
  logic [W-1:0] node [2*N-1];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign node[i] = din[i];
  end

  for (genvar l = 0; l < S; l++) begin : g_lvl
    localparam int unsigned CELLS = N >> (l + 1);
    localparam int unsigned IN_OFF  = 2 * N - ((2 * N) >> l);
    localparam int unsigned OUT_OFF = 2 * N - ((2 * N) >> (l + 1));
    for (genvar j = 0; j < CELLS; j++) begin : g_cell
      mux2_cell #(.W(W)) u_cell (
        .in0 (node[IN_OFF + 2 * j]),
        .in1 (node[IN_OFF + 2 * j + 1]),
        .s   (sel[sel_offset(N, l) + j]),
        .y   (node[OUT_OFF + j])
      );
    end
  end

  assign dout = node[2 * N - 2];

endmodule
