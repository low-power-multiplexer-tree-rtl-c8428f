// lp_mux_tree: low-power N-to-1, W-bit multiplexer tree with dynamic input
// selection control.
//
// A conventional MUX tree shares one selection bit among all cells of a level,
// so a change of address toggles the selection of every cell in that level,
// and all of those cells switch although only the cells on the path to the
// output matter. Here every 2-to-1 cell has its own selection signal
// (mux_tree_indep) and a controller (tl_ctrl) derives these N-1 signals from
// the S-bit address: only the cells on the new output path may change their
// selection, all others keep theirs. The controller is the Two-Level
// Controller: a free-running Level-1 part for the upper levels and clock-gated
// Level-2 groups of 2^G - 1 registers for the lower levels.
//
// Interface:
//   mux_sel   S-bit address of the input to select (S = log2 N)
//   mux_in    the N data inputs, mux_in[i] is input i
//   mux_out   the selected input
//   cell_sel  the N-1 per-cell selection signals (flat layout of
//             mux_tree_pkg); an observation output for test and power
//             analysis, not needed for normal use
// Timing: the address goes through the controller's registers, so mux_out
// equals mux_in[a] one clock after address a was presented at a rising edge;
// the data path itself is combinational, so mux_out follows mux_in in the same
// cycle. After reset (rst_n low, asynchronous) input 0 is selected.
//
// Defaults are the largest configuration evaluated for this architecture:
// N = 256, W = 128, groups of 31 registers (G = 5, eight groups). G = 0
// gives the Single-Level Controller. N must be a power of two, at least 2.
//
// The controller/tree split, the per-cell selection signals, the update rule
// and the grouping follow the original architecture. The reset, the cell_sel
// observation port and the unregistered output are choices of this design.
module lp_mux_tree
  import mux_tree_pkg::*;
#(
  parameter int unsigned N = 256,                    // number of inputs
  parameter int unsigned W = 128,                    // data width in bits
  parameter int unsigned G = default_group_bits(N)   // bits per gated group
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(N)-1:0]        mux_sel,
  input  logic [N-1:0][W-1:0]         mux_in,
  output logic [W-1:0]                mux_out,
  output logic [N-2:0]                cell_sel
);

  localparam int unsigned S = $clog2(N);

  tl_ctrl #(.SB(S), .G(G)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .mux_sel (mux_sel),
    .sel_q   (cell_sel)
  );

  mux_tree_indep #(.N(N), .W(W)) u_tree (
    .sel  (cell_sel),
    .din  (mux_in),
    .dout (mux_out)
  );

endmodule
