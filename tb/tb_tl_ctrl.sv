// tb_tl_ctrl: self-checking test of the Two-Level Controller.
// Three 64-input controllers receive the same random addresses:
//   four groups of 15 registers (G = 4), eight groups of 7 (G = 3), and
//   G = 0, which falls back to the Single-Level Controller.
// All three must produce exactly the per-cell selections of the reference
// model (only the cells on the new path take their address bit). For the two
// gated forms the test counts the clock pulses each group receives, which
// must equal the cycles in which that group was addressed, and the register
// writes per cycle, which must be 1+1+1+15 = 18 for four groups and
// 1+3+3+7 = 14 for eight groups, against 63 for the single-level form.
module tb_tl_ctrl;
  import mux_tree_pkg::*;

  localparam int unsigned SB = 6, M = 1 << SB;

  logic clk = 0, rst_n = 1;
  logic [SB-1:0] addr;
  logic [M-2:0]  q4, q8, q1, ref_q;
  int unsigned checks = 0, failures = 0;
  int unsigned pulses4 [4], pulses8 [8], hits4 [4], hits8 [8];

  tl_ctrl #(.SB(SB), .G(4)) dut4 (.clk(clk), .rst_n(rst_n), .mux_sel(addr), .sel_q(q4));
  tl_ctrl #(.SB(SB), .G(3)) dut8 (.clk(clk), .rst_n(rst_n), .mux_sel(addr), .sel_q(q8));
  tl_ctrl #(.SB(SB), .G(0)) dut1 (.clk(clk), .rst_n(rst_n), .mux_sel(addr), .sel_q(q1));

  for (genvar g = 0; g < 4; g++) begin : g_cnt4
    always @(posedge dut4.g_two_level.g_group[g].u_level2.gclk) pulses4[g]++;
  end
  for (genvar g = 0; g < 8; g++) begin : g_cnt8
    always @(posedge dut8.g_two_level.g_group[g].u_level2.gclk) pulses8[g]++;
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int unsigned cycles = 0;
    int unsigned writes4, writes8;
    foreach (pulses4[g]) begin pulses4[g] = 0; hits4[g] = 0; end
    foreach (pulses8[g]) begin pulses8[g] = 0; hits8[g] = 0; end
    addr = '0; ref_q = '0;
    #1 rst_n = 0;
    #11 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int unsigned a;
      @(negedge clk);
      if (t == 0) begin   // count only the pulses of the measured cycles
        foreach (pulses4[g]) pulses4[g] = 0;
        foreach (pulses8[g]) pulses8[g] = 0;
      end
      checks++;
      if (q4 !== ref_q) begin failures++; $display("4 groups: cycle %0d mismatch", t); end
      checks++;
      if (q8 !== ref_q) begin failures++; $display("8 groups: cycle %0d mismatch", t); end
      checks++;
      if (q1 !== ref_q) begin failures++; $display("single level: cycle %0d mismatch", t); end
      a = $urandom_range(M - 1);
      addr = SB'(a);
      for (int l = 0; l < SB; l++) ref_q[sel_offset(M, l) + (a >> (l + 1))] = a[l];
      hits4[a >> 4]++;
      hits8[a >> 3]++;
      cycles++;
    end
    @(negedge clk);
    checks++;
    if (q4 !== ref_q || q8 !== ref_q || q1 !== ref_q) begin failures++; $display("final mismatch"); end
    writes4 = 3 * cycles;   // Level-1 registers of the 4-group form (S50, S40, S41)
    writes8 = 7 * cycles;   // Level-1 registers of the 8-group form
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (pulses4[g] != hits4[g]) begin failures++; $display("4 groups: group %0d pulses %0d hits %0d", g, pulses4[g], hits4[g]); end
      writes4 += 15 * pulses4[g];
    end
    for (int g = 0; g < 8; g++) begin
      checks++;
      if (pulses8[g] != hits8[g]) begin failures++; $display("8 groups: group %0d pulses %0d hits %0d", g, pulses8[g], hits8[g]); end
      writes8 += 7 * pulses8[g];
    end
    checks++;
    if (writes4 != 18 * cycles) begin failures++; $display("4 groups: %0d register writes in %0d cycles", writes4, cycles); end
    checks++;
    if (writes8 != 14 * cycles) begin failures++; $display("8 groups: %0d register writes in %0d cycles", writes8, cycles); end
    $display("register writes per cycle: single level 63, 4 groups %0d, 8 groups %0d",
             writes4 / cycles, writes8 / cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
