// lp_mux_tree_harness: drives one lp_mux_tree configuration with its own clock
// for 64 x N cycles with a new random address every cycle, and checks it.
// Data: with LOW_ACTIVITY = 0 every input gets new random data every cycle
// (random workload); with LOW_ACTIVITY = 1 one random input is rewritten per
// cycle and all others hold, as when the tree reads a register file with a
// single write port (constrained workload). Used by tb_lp_mux_tree_configs to run many
// sizes side by side.
// Checked every cycle: the output equals the input addressed one cycle
// earlier; the per-cell selections equal a reference model that updates only
// the addressed path. For clock-gated configurations, each group must receive
// a clock pulse exactly in the cycles it is addressed. At the end the number of
// selection-register writes per cycle must be (groups - 1) + (2^G - 1) when
// gated, N - 1 otherwise. Results are reported through the output ports.
module lp_mux_tree_harness
  import mux_tree_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8,
  parameter int unsigned G = default_group_bits(N),
  parameter bit          LOW_ACTIVITY = 1'b0
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned writes_per_cycle
);
  localparam int unsigned S = $clog2(N);
  localparam bit          GATED = use_clock_gating(S, G);
  localparam int unsigned GROUPS = GATED ? (N >> G) : 1;
  localparam int unsigned CYCLES = 64 * N;
  localparam int unsigned P = (W < 32) ? W : 32;   // bits per random word
  localparam int unsigned GM1 = GROUPS - 1;
  localparam int unsigned GREGS = (1 << G) - 1;
  localparam int unsigned NM1 = N - 1;
  localparam int unsigned WPC32 = GATED ? GM1 + GREGS : NM1;
  localparam longint unsigned WPC = longint'(WPC32);
  localparam longint unsigned CYCLES_L = longint'(CYCLES);

  logic clk = 1'b0, rst_n = 1'b1;
  logic [S-1:0]        mux_sel;
  logic [N-1:0][W-1:0] mux_in;
  logic [W-1:0]        mux_out;
  logic [N-2:0]        cell_sel, ref_sel;
  int unsigned         pulses [GROUPS];

  lp_mux_tree #(.N(N), .W(W), .G(G)) dut (
    .clk(clk), .rst_n(rst_n), .mux_sel(mux_sel), .mux_in(mux_in),
    .mux_out(mux_out), .cell_sel(cell_sel));

  if (GATED) begin : g_gated
    for (genvar g = 0; g < GROUPS; g++) begin : g_cnt
      always @(posedge dut.u_ctrl.g_two_level.g_group[g].u_level2.gclk) pulses[g]++;
    end
  end

  always #5 clk = ~clk;

  initial begin
    int unsigned a, prev_a, wa;
    logic [N-1:0][W-1:0] prev_in;
    longint unsigned writes;
    done = 1'b0; checks = 0; failures = 0; writes = 0; writes_per_cycle = 0;
    #1 rst_n = 1'b0;
    mux_sel = '0;
    foreach (mux_in[i]) mux_in[i] = '0;
    prev_in = mux_in;
    #11 rst_n = 1'b1;
    ref_sel = '0;
    prev_a = 0;
    for (int t = 0; t <= CYCLES; t++) begin
      @(negedge clk);
      if (t > 0) begin
        if (GATED) begin
          for (int g = 0; g < GROUPS; g++) begin
            checks++;
            if (pulses[g] != (((prev_a >> G) == g) ? 1 : 0)) failures++;
            writes += longint'(pulses[g] * ((1 << G) - 1));
          end
          writes += longint'(GM1);
        end else begin
          writes += longint'(NM1);
        end
        checks++;
        if (mux_out !== mux_in[prev_a]) failures++;
        checks++;
        if (cell_sel !== ref_sel) failures++;
      end
      for (int g = 0; g < GROUPS; g++) pulses[g] = 0;
      if (t == CYCLES) break;
      a = $urandom_range(N - 1);
      wa = $urandom_range(N - 1);
      mux_sel = S'(a);
      for (int i = 0; i < N; i++) begin
        if (!LOW_ACTIVITY || i == int'(wa)) begin
          for (int k = 0; k < W; k += 32) begin
            automatic logic [31:0] r = $urandom;
            mux_in[i][k +: P] = r[P-1:0];
          end
        end
      end
      if (LOW_ACTIVITY) begin
        // only the written entry may differ from the previous cycle
        checks++;
        for (int i = 0; i < N; i++)
          if (i != int'(wa) && mux_in[i] !== prev_in[i]) begin failures++; break; end
      end
      prev_in = mux_in;
      for (int l = 0; l < S; l++) ref_sel[sel_offset(N, l) + (a >> (l + 1))] = a[l];
      prev_a = a;
    end
    writes_per_cycle = int'(writes / CYCLES_L);
    checks++;
    if (writes != WPC * CYCLES_L) failures++;
    done = 1'b1;
  end
endmodule
