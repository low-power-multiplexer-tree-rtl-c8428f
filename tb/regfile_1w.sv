// regfile_1w: behavioural model of a register file with one write port whose
// entries are all read in parallel, as the data source of a MUX tree. At most
// one entry changes per clock, so the tree's inputs have low switching
// activity. Entry waddr takes wdata on the rising edge when we is high;
// rst_n (asynchronous, active low) clears all entries. Test use only.
module regfile_1w #(
  parameter int unsigned N = 256,
  parameter int unsigned W = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  output logic [N-1:0][W-1:0]  q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (we) begin
      q[waddr] <= wdata;
    end
  end
endmodule
