// tb_lp_mux_tree: end-to-end test of the low-power MUX tree at reduced size.
// A 32-input, 8-bit tree (four clock-gated groups of 7 registers) is driven
// with random addresses and random data every cycle, with stretches where the
// address is repeated, stays inside one group, or jumps between groups, and an
// asynchronous reset in the middle of the run.
// Checked every cycle:
//   - mux_out equals the input addressed one cycle earlier, for the data
//     present now (the data path is combinational, the address registered);
//   - cell_sel equals a reference model in which only the cells on the new
//     path take their address bit;
//   - at most one selection signal changes per level;
//   - each group's gated clock pulses exactly in the cycles it is addressed.
// Counted, and required to happen at least once: a level whose address bit
// changed while only one of its cells switched (transitions suppressed compared
// with a shared-select tree), a group left unclocked, a move to another group,
// a cycle with the address held and only data changing, and a reset.
module tb_lp_mux_tree;
  import mux_tree_pkg::*;

  localparam int unsigned N = 32, W = 8;
  localparam int unsigned S = $clog2(N);
  localparam int unsigned G = default_group_bits(N);
  localparam int unsigned GROUPS = N >> G;

  logic clk = 0, rst_n = 1;
  logic [S-1:0]        mux_sel;
  logic [N-1:0][W-1:0] mux_in;
  logic [W-1:0]        mux_out;
  logic [N-2:0]        cell_sel, ref_sel, prev_sel;
  int unsigned checks = 0, failures = 0;
  int unsigned pulses [GROUPS];
  int unsigned n_suppressed = 0, n_gated_off = 0, n_group_switch = 0;
  int unsigned n_data_only = 0, n_reset = 0;
  longint unsigned toggles_prop = 0, toggles_conv = 0;

  lp_mux_tree #(.N(N), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .mux_sel(mux_sel), .mux_in(mux_in),
    .mux_out(mux_out), .cell_sel(cell_sel));

  for (genvar g = 0; g < GROUPS; g++) begin : g_cnt
    always @(posedge dut.u_ctrl.g_two_level.g_group[g].u_level2.gclk) pulses[g]++;
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("%t: %s", $time, msg);
  endtask

  initial begin
    int unsigned a, prev_a;
    #1 rst_n = 0;
    mux_sel = '0;
    foreach (mux_in[i]) mux_in[i] = W'($urandom);
    #11 rst_n = 1;
    ref_sel = '0;
    prev_a = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      foreach (pulses[g]) begin
        if (t > 0) begin
          checks++;
          if (pulses[g] != ((prev_a >> G) == g ? 1 : 0)) fail($sformatf("group %0d pulses %0d", g, pulses[g]));
          if (pulses[g] == 0) n_gated_off++;
        end
        pulses[g] = 0;
      end
      // result of the address applied at the last rising edge
      checks++;
      if (mux_out !== mux_in[prev_a]) fail($sformatf("mux_out %h, expected input %0d = %h", mux_out, prev_a, mux_in[prev_a]));
      checks++;
      if (cell_sel !== ref_sel) fail("cell_sel differs from reference");
      for (int l = 0; l < S; l++) begin
        automatic int unsigned n = 0;
        for (int j = 0; j < (N >> (l + 1)); j++)
          n += (cell_sel[sel_offset(N, l) + j] != prev_sel[sel_offset(N, l) + j]) ? 1 : 0;
        checks++;
        if (t > 0 && n > 1) fail($sformatf("level %0d: %0d selections changed", l, n));
      end
      if (t > 0) toggles_prop += $countones(cell_sel ^ prev_sel);
      prev_sel = cell_sel;

      // mid-run asynchronous reset
      if (t == 3000) begin
        rst_n = 0;
        #1;
        checks++;
        if (cell_sel !== '0 || mux_out !== mux_in[0]) fail("reset did not select input 0");
        n_reset++;
        ref_sel = '0;
        prev_sel = '0;
        prev_a = 0;
        mux_sel = '0;
        #2 rst_n = 1;
        continue;
      end

      // next address: mostly random, with held, same-group and cross-group runs
      case ((t / 200) % 4)
        0:       a = $urandom_range(N - 1);
        1:       a = (t % 3 == 0) ? prev_a : $urandom_range(N - 1);
        2:       a = (prev_a & ~((1 << G) - 1)) | $urandom_range((1 << G) - 1);
        default: a = prev_a ^ (1 << (S - 1)) ^ $urandom_range(N - 1) & ((1 << G) - 1);
      endcase
      a = a % N;
      mux_sel = S'(a);
      foreach (mux_in[i]) mux_in[i] = W'($urandom);
      #1;
      // the new address is not in effect yet: same input, new data
      checks++;
      if (mux_out !== mux_in[prev_a]) fail("data path is not combinational or address latency wrong");
      if (a == prev_a) n_data_only++;
      if ((a >> G) != (prev_a >> G)) n_group_switch++;
      for (int l = 0; l < S; l++) begin
        if (a[l] != prev_a[l]) begin
          toggles_conv += 64'(N >> (l + 1));
          if ((N >> (l + 1)) > 1) n_suppressed++;
        end
      end
      for (int l = 0; l < S; l++) ref_sel[sel_offset(N, l) + (a >> (l + 1))] = a[l];
      prev_a = a;
    end
    checks++;
    if (toggles_prop >= toggles_conv) fail("no reduction of selection transitions");
    checks++; if (n_suppressed == 0)   fail("no suppressed level transition");
    checks++; if (n_gated_off == 0)    fail("no gated-off group");
    checks++; if (n_group_switch == 0) fail("no group switch");
    checks++; if (n_data_only == 0)    fail("no held address with data change");
    checks++; if (n_reset == 0)        fail("no reset");
    $display("selection-signal transitions: %0d proposed, %0d with shared selects",
             toggles_prop, toggles_conv);
    $display("events: suppressed-level %0d, gated-off group-cycles %0d, group switches %0d, held %0d, resets %0d",
             n_suppressed, n_gated_off, n_group_switch, n_data_only, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
