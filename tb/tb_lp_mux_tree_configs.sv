// tb_lp_mux_tree_configs: runs the grid of tree configurations the
// architecture was evaluated on, each in its own harness, for 64 x N cycles:
//   random workload, N = 8, 16, 32, 64, 128, 256 with the default grouping,
//     at W = 1 and 128;
//   the same sizes with the Single-Level Controller (G = 0), W = 128;
//   the alternative grouping for N = 64, 128 (eight groups) and 256 (four);
//   constrained workload (one input rewritten per cycle, as from a
//     single-write-port register file), all six sizes, W = 128, with the
//     default grouping and with the Single-Level Controller.
// Each harness checks its outputs, selections, gated clocks and register
// writes; this testbench sums the results and prints the register writes per
// cycle of every configuration.
module tb_lp_mux_tree_configs;
  localparam int unsigned NCFG = 33;
  localparam int unsigned CFG_N [NCFG] = '{8, 16, 32, 64, 128, 256,
                                           8, 16, 32, 64, 128, 256,
                                           8, 16, 32, 64, 128, 256,
                                           64, 128, 256,
                                           8, 16, 32, 64, 128, 256,
                                           8, 16, 32, 64, 128, 256};
  localparam int unsigned CFG_W [NCFG] = '{1, 1, 1, 1, 1, 1,
                                           128, 128, 128, 128, 128, 128,
                                           128, 128, 128, 128, 128, 128,
                                           128, 128, 128,
                                           128, 128, 128, 128, 128, 128,
                                           128, 128, 128, 128, 128, 128};
  // 99 selects the default group size of mux_tree_pkg
  localparam int unsigned CFG_G [NCFG] = '{99, 99, 99, 99, 99, 99,
                                           99, 99, 99, 99, 99, 99,
                                           0, 0, 0, 0, 0, 0,
                                           3, 4, 6,
                                           99, 99, 99, 99, 99, 99,
                                           0, 0, 0, 0, 0, 0};
  localparam bit CFG_LOW [NCFG] = '{default: 1'b0, 21: 1'b1, 22: 1'b1,
                                    23: 1'b1, 24: 1'b1, 25: 1'b1, 26: 1'b1,
                                    27: 1'b1, 28: 1'b1, 29: 1'b1, 30: 1'b1,
                                    31: 1'b1, 32: 1'b1};

  logic        done     [NCFG];
  int unsigned checks   [NCFG];
  int unsigned failures [NCFG];
  int unsigned wpc      [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned G = (CFG_G[c] == 99) ?
      mux_tree_pkg::default_group_bits(CFG_N[c]) : CFG_G[c];
    lp_mux_tree_harness #(.N(CFG_N[c]), .W(CFG_W[c]), .G(G),
                          .LOW_ACTIVITY(CFG_LOW[c])) u_h (
      .done(done[c]), .checks(checks[c]), .failures(failures[c]),
      .writes_per_cycle(wpc[c]));
  end

  initial begin : watchdog
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    automatic int unsigned total_checks = 0, total_failures = 0;
    bit all_done;
    do begin
      #100;
      all_done = 1'b1;
      for (int c = 0; c < NCFG; c++) all_done &= done[c];
    end while (!all_done);
    for (int c = 0; c < NCFG; c++) begin
      $display("%s N=%0d W=%0d G=%s: register writes per cycle %0d of %0d, failures %0d",
               CFG_LOW[c] ? "constrained" : "random     ", CFG_N[c], CFG_W[c],
               (CFG_G[c] == 99) ? "default" : $sformatf("%0d", CFG_G[c]),
               wpc[c], CFG_N[c] - 1, failures[c]);
      total_checks += checks[c];
      total_failures += failures[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
