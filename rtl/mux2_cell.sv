// mux2_cell: one W-bit 2-to-1 multiplexer cell, the building block of the tree.
//
// y = in0 when s = 0, y = in1 when s = 1. The cell is purely combinational.
// It stands for the library 2-to-1 MUX cell from which the whole tree is
// built; every cell of the tree receives its own selection signal s. Output
// transitions come either from a change of s or from a change of the data
// input currently selected.
// A library 2-to-1 cell is one bit wide; a W-bit cell here stands for W such
// cells sharing one selection signal, which is how the tree carries W-bit data.
module mux2_cell #(
  parameter int unsigned W = 128   // data width in bits
) (
  input  logic [W-1:0] in0,        // selected when s = 0
  input  logic [W-1:0] in1,        // selected when s = 1
  input  logic         s,          // this cell's own selection signal
  output logic [W-1:0] y
);

  always_comb y = s ? in1 : in0;

endmodule
