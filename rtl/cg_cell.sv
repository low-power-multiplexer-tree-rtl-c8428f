// cg_cell: latch-based clock gating cell.
//
// The enable is captured by a latch that is transparent while clk is low and
// holds while clk is high; the gated clock is clk AND the latched enable. An
// enable that changes while clk is high therefore cannot cut or create a
// clock pulse: gclk carries a full pulse of clk in every cycle whose enable was
// high just before the rising edge, and stays low otherwise.
//
// The latch is intended (it is the storage element of the gating cell), so a
// latch warning from lint or synthesis on this module is expected. In a
// standard-cell flow this module is replaced by the library's integrated
// clock gating cell.
module cg_cell (
  input  logic clk,
  input  logic en,     // clock enable for the next rising edge
  output logic gclk    // gated clock
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
