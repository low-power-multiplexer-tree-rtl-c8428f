// tb_lp_mux_tree_full: the low-power MUX tree at its default size, 256 inputs
// of 128 bits with eight clock-gated groups, under the random workload: a new
// random address and new random data on every input in every cycle, for
// 64 x 256 = 16384 cycles, so that every input is selected many times.
// Every cycle the output is compared with the input addressed one cycle
// earlier and the per-cell selections with a reference model. The test also
// counts selection-signal transitions against a tree whose cells share one
// select per level, and selection-register writes (Level-1 registers plus
// those of the one group that gets a clock edge) against 255 per cycle.
module tb_lp_mux_tree_full;
  import mux_tree_pkg::*;

  localparam int unsigned N = 256, W = 128;
  localparam int unsigned S = $clog2(N);
  localparam int unsigned G = default_group_bits(N);
  localparam int unsigned GROUPS = N >> G;
  localparam int unsigned CYCLES = 64 * N;
  // selection-register writes per cycle: Level-1 registers plus one group
  localparam int unsigned GM1 = GROUPS - 1;            // Level-1 registers
  localparam int unsigned GREGS = (1 << G) - 1;        // registers per group
  localparam int unsigned WPC32 = GM1 + GREGS;
  localparam longint unsigned WPC = longint'(WPC32);
  localparam longint unsigned CYCLES_L = longint'(CYCLES);

  logic clk = 0, rst_n = 1;
  logic [S-1:0]        mux_sel;
  logic [N-1:0][W-1:0] mux_in;
  logic [W-1:0]        mux_out;
  logic [N-2:0]        cell_sel, ref_sel, prev_sel;
  int unsigned checks = 0, failures = 0;
  int unsigned pulses [GROUPS];
  longint unsigned toggles_prop = 0, toggles_conv = 0, reg_writes = 0;

  lp_mux_tree dut (
    .clk(clk), .rst_n(rst_n), .mux_sel(mux_sel), .mux_in(mux_in),
    .mux_out(mux_out), .cell_sel(cell_sel));

  for (genvar g = 0; g < GROUPS; g++) begin : g_cnt
    always @(posedge dut.u_ctrl.g_two_level.g_group[g].u_level2.gclk) pulses[g]++;
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a, prev_a;
    #1 rst_n = 0;
    mux_sel = '0;
    foreach (mux_in[i]) mux_in[i] = '0;
    #11 rst_n = 1;
    ref_sel = '0;
    prev_sel = '0;
    prev_a = 0;
    for (int t = 0; t <= CYCLES; t++) begin
      @(negedge clk);
      if (t > 0) begin
        automatic int unsigned clocked = 0;
        foreach (pulses[g]) begin
          checks++;
          if (pulses[g] != ((prev_a >> G) == g ? 1 : 0)) begin
            failures++; $display("cycle %0d: group %0d got %0d clock pulses", t, g, pulses[g]);
          end
          clocked += pulses[g];
        end
        reg_writes += longint'(GM1) + longint'(clocked * GREGS);
        checks++;
        if (mux_out !== mux_in[prev_a]) begin
          failures++; $display("cycle %0d: wrong output for input %0d", t, prev_a);
        end
        checks++;
        if (cell_sel !== ref_sel) begin failures++; $display("cycle %0d: cell_sel mismatch", t); end
        toggles_prop += $countones(cell_sel ^ prev_sel);
      end
      foreach (pulses[g]) pulses[g] = 0;
      prev_sel = cell_sel;
      if (t == CYCLES) break;
      a = $urandom_range(N - 1);
      mux_sel = S'(a);
      for (int i = 0; i < N; i++)
        for (int k = 0; k < W / 32; k++) mux_in[i][k*32 +: 32] = $urandom;
      for (int l = 0; l < S; l++) begin
        if (a[l] != prev_a[l]) toggles_conv += 64'(N >> (l + 1));
        ref_sel[sel_offset(N, l) + (a >> (l + 1))] = a[l];
      end
      prev_a = a;
    end
    checks++;
    if (reg_writes != WPC * CYCLES_L) begin
      failures++; $display("register writes %0d", reg_writes);
    end
    checks++;
    if (toggles_prop * 4 > toggles_conv) begin
      failures++; $display("selection transitions not reduced as expected");
    end
    $display("cycles %0d: selection transitions %0d (shared selects: %0d)",
             CYCLES, toggles_prop, toggles_conv);
    $display("selection-register writes per cycle: %0d of %0d",
             reg_writes / CYCLES_L, N - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
