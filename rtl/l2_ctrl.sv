// l2_ctrl: Level-2 Controller of one clock-gated register group.
//
// A group is the subtree of 2^G inputs whose index, in the upper address bits
// mux_sel_hi, equals GROUP. Its 2^G - 1 cell selection registers only need to
// change when the addressed input lies in this subtree. A clock gating cell,
// enabled when mux_sel_hi == GROUP, clocks them only in those cycles; in all
// other cycles the registers receive no clock edge at all.
// Inside the group the registers follow the single-level rule of sl_ctrl on
// the lower address bits mux_sel_lo: the group's top cell simply takes
// mux_sel_lo[G-1], and lower cells load their bit only when on the path.
//
// Interface: sel_q in the flat layout of mux_tree_pkg for a 2^G-input tree.
// Timing: the address is sampled on the rising edge of clk (through the gated
// clock), so sel_q changes one cycle after the address, like sl_ctrl.
// rst_n is asynchronous and reaches the registers whether or not the clock is
// gated.
module l2_ctrl #(
  parameter int unsigned G     = 5,   // address bits inside the group
  parameter int unsigned HB    = 3,   // upper address bits (group index)
  parameter int unsigned GROUP = 0    // index of this group
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [HB-1:0]      mux_sel_hi,  // group index of the address
  input  logic [G-1:0]       mux_sel_lo,  // address inside the group
  output logic [(1<<G)-2:0]  sel_q
);

  logic hit;    // the addressed input is in this group
  logic gclk;

  assign hit = (mux_sel_hi == HB'(GROUP));

  cg_cell u_cg (
    .clk  (clk),
    .en   (hit),
    .gclk (gclk)
  );

  sl_ctrl #(.SB(G)) u_regs (
    .clk     (gclk),
    .rst_n   (rst_n),
    .mux_sel (mux_sel_lo),
    .sel_q   (sel_q)
  );

endmodule
