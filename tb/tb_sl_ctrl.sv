// tb_sl_ctrl: self-checking test of the Single-Level Controller.
// An 8-input (SB = 3) and a 64-input (SB = 6) controller get the same stream
// of addresses (the 64-input one the full 6 bits). A reference model keeps one
// value per cell and, for address a, sets only cell (a >> (l+1)) of each level
// l to bit l of a. After every clock the registered outputs must equal the
// model, the walk down the selected path must reach a, at most one cell per
// level may have changed, and cells off the path must keep their values.
// The 8-input case also replays the worked example 000 -> 011, after which
// exactly S01 and S10 have changed. Reset must clear every register.
module tb_sl_ctrl;
  import mux_tree_pkg::*;

  localparam int unsigned SA = 3, SBB = 6;
  localparam int unsigned MA = 1 << SA, MB = 1 << SBB;

  logic clk = 0, rst_n = 1;
  logic [SBB-1:0] addr;
  logic [MA-2:0]  q_a;
  logic [MB-2:0]  q_b;
  logic [MB-2:0]  ref_a;   // model of the 8-input controller, low bits used
  logic [MA-2:0]  prev_a;
  logic [MB-2:0]  ref_b, prev_b;
  int unsigned checks = 0, failures = 0;
  int unsigned held_cells = 0;   // off-path cells whose level bit differs but held

  sl_ctrl #(.SB(SA))  dut_a (.clk(clk), .rst_n(rst_n), .mux_sel(addr[SA-1:0]), .sel_q(q_a));
  sl_ctrl #(.SB(SBB)) dut_b (.clk(clk), .rst_n(rst_n), .mux_sel(addr),         .sel_q(q_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [MB-2:0] model(int unsigned m, logic [MB-2:0] cur, int unsigned a);
    logic [MB-2:0] r = cur;
    for (int l = 0; l < $clog2(m); l++) r[sel_offset(m, l) + (a >> (l + 1))] = a[l];
    return r;
  endfunction

  function automatic int unsigned walk(int unsigned m, logic [MB-2:0] sel);
    int unsigned j = 0;
    for (int l = $clog2(m) - 1; l >= 0; l--) j = 2 * j + int'(sel[sel_offset(m, l) + j]);
    return j;
  endfunction

  task automatic check_step(int unsigned a);
    logic [MB-2:0] diff;
    checks++;
    if (q_a !== ref_a[MA-2:0]) begin failures++; $display("SB=3 a=%0d q=%b ref=%b", a, q_a, ref_a[MA-2:0]); end
    checks++;
    if (q_b !== ref_b) begin failures++; $display("SB=6 a=%0d mismatch", a); end
    checks++;
    if (walk(MB, q_b) != a || walk(MA, {{(MB - MA){1'b0}}, q_a}) != (a % MA)) begin
      failures++; $display("path does not reach address %0d", a);
    end
    // at most one changed cell per level
    diff = q_b ^ prev_b;
    for (int l = 0; l < SBB; l++) begin
      automatic int unsigned n = 0;
      for (int j = 0; j < (MB >> (l + 1)); j++) n += diff[sel_offset(MB, l) + j];
      checks++;
      if (n > 1) begin failures++; $display("level %0d: %0d cells changed", l, n); end
      for (int j = 0; j < (MB >> (l + 1)); j++)
        if (j != (a >> (l + 1)) && q_b[sel_offset(MB, l) + j] != a[l]) held_cells++;
    end
  endtask

  initial begin
    addr = '0;
    ref_a = '0; ref_b = '0;
    #1 rst_n = 0;
    #11 rst_n = 1;
    @(negedge clk);
    checks++;
    if (q_a !== '0 || q_b !== '0) begin failures++; $display("reset did not clear"); end
    // worked example on the 8-input tree: 000 then 011
    addr = 6'b000000;
    @(negedge clk);
    prev_a = q_a;
    addr = 6'b000011;
    @(negedge clk);
    checks++;
    // S01 is cell 1 of level 0 (bit 1); S10 is cell 0 of level 1 (bit 4)
    if ((q_a ^ prev_a) !== 7'b0010010) begin
      failures++; $display("example 000->011 changed %b", q_a ^ prev_a);
    end
    ref_a = model(MA, ref_a, 3); ref_b = model(MB, ref_b, 3);
    // random addresses
    for (int t = 0; t < 2000; t++) begin
      automatic int unsigned a = $urandom_range(MB - 1);
      prev_b = q_b;
      addr = SBB'(a);
      ref_a = model(MA, ref_a, a % MA);
      ref_b = model(MB, ref_b, a);
      @(negedge clk);
      check_step(a);
    end
    checks++;
    if (held_cells == 0) begin failures++; $display("no held cell observed"); end
    // asynchronous reset in the middle of operation
    rst_n = 0;
    #1;
    checks++;
    if (q_a !== '0 || q_b !== '0) begin failures++; $display("async reset did not clear"); end
    $display("held off-path cells observed: %0d", held_cells);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
