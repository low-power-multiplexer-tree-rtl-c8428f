// tb_l2_ctrl: self-checking test of one Level-2 Controller group.
// Group 2 of a tree cut into four groups of 8 inputs (G = 3, 2 upper bits).
// Random addresses are applied each cycle. The group's registers may change
// only in cycles whose upper address bits equal 2; then they follow the
// single-level rule on the lower 3 bits. The test counts gated clock pulses
// and requires one per addressed cycle and none otherwise, and checks that
// reset clears the group even while its clock is gated off.
module tb_l2_ctrl;
  import mux_tree_pkg::*;

  localparam int unsigned G = 3, HB = 2, GROUP = 2;
  localparam int unsigned GN = 1 << G;

  logic clk = 0, rst_n = 1;
  logic [HB-1:0] hi;
  logic [G-1:0]  lo;
  logic [GN-2:0] q, ref_q;
  int unsigned checks = 0, failures = 0;
  int unsigned pulses = 0, hits = 0, misses = 0;

  l2_ctrl #(.G(G), .HB(HB), .GROUP(GROUP)) dut (
    .clk(clk), .rst_n(rst_n), .mux_sel_hi(hi), .mux_sel_lo(lo), .sel_q(q));

  always #5 clk = ~clk;
  always @(posedge dut.gclk) pulses++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hi = '0; lo = '0; ref_q = '0;
    #1 rst_n = 0;
    #11 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t == 0) pulses = 0;   // count only the pulses of the measured cycles
      checks++;
      if (q !== ref_q) begin failures++; $display("cycle %0d: q=%b ref=%b", t, q, ref_q); end
      hi = HB'($urandom_range((1 << HB) - 1));
      lo = G'($urandom);
      if (int'(hi) == GROUP) begin
        hits++;
        for (int l = 0; l < G; l++) ref_q[sel_offset(GN, l) + (int'(lo) >> (l + 1))] = lo[l];
      end else begin
        misses++;
      end
    end
    @(negedge clk);
    checks++;
    if (q !== ref_q) begin failures++; $display("final q mismatch"); end
    checks++;
    if (pulses != hits) begin failures++; $display("gated pulses %0d, addressed cycles %0d", pulses, hits); end
    checks++;
    if (misses == 0 || hits == 0) begin failures++; $display("gating not exercised"); end
    // reset while the group is not addressed (clock gated off)
    hi = HB'(GROUP + 1);
    @(negedge clk);
    rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset did not clear gated group"); end
    $display("gated pulses %0d of %0d cycles", pulses, hits + misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
