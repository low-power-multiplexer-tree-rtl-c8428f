// tb_lp_mux_tree_regfile: the default 256 x 128-bit low-power MUX tree reading
// a single-write-port register file (the constrained-input workload). Every
// cycle one random entry is written with random data and a random entry is
// selected, for 64 x 256 = 16384 cycles. A mirror of the register file in the
// testbench gives the expected output. Checked: the output every cycle, that
// no more than one tree input changes per cycle, and that writes to the entry
// currently selected, and to other entries, both occur.
module tb_lp_mux_tree_regfile;
  localparam int unsigned N = 256, W = 128;
  localparam int unsigned S = $clog2(N);
  localparam int unsigned CYCLES = 64 * N;

  logic clk = 0, rst_n = 1;
  logic                we;
  logic [S-1:0]        waddr, mux_sel;
  logic [W-1:0]        wdata, mux_out;
  logic [N-1:0][W-1:0] rf_q, prev_q;
  logic [N-2:0]        cell_sel;
  logic [W-1:0]        mirror [N];
  int unsigned checks = 0, failures = 0;
  int unsigned hit_selected = 0, hit_other = 0;

  regfile_1w #(.N(N), .W(W)) u_rf (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .q(rf_q));

  lp_mux_tree dut (
    .clk(clk), .rst_n(rst_n), .mux_sel(mux_sel), .mux_in(rf_q),
    .mux_out(mux_out), .cell_sel(cell_sel));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a, prev_a, wa;
    #1 rst_n = 0;
    we = 0; waddr = '0; wdata = '0; mux_sel = '0;
    foreach (mirror[i]) mirror[i] = '0;
    #11 rst_n = 1;
    prev_a = 0;
    prev_q = rf_q;
    for (int t = 0; t <= CYCLES; t++) begin
      @(negedge clk);
      if (t > 0) begin
        automatic int unsigned changed = 0;
        for (int i = 0; i < N; i++) changed += int'(rf_q[i] != prev_q[i]);
        checks++;
        if (changed > 1) begin failures++; $display("cycle %0d: %0d inputs changed", t, changed); end
        checks++;
        if (mux_out !== mirror[prev_a]) begin
          failures++; $display("cycle %0d: wrong output for entry %0d", t, prev_a);
        end
      end
      prev_q = rf_q;
      if (t == CYCLES) break;
      a  = $urandom_range(N - 1);
      wa = $urandom_range(N - 1);
      mux_sel = S'(a);
      we = 1'b1;
      waddr = S'(wa);
      for (int k = 0; k < W / 32; k++) wdata[k*32 +: 32] = $urandom;
      mirror[wa] = wdata;          // visible after the coming edge
      if (wa == a) hit_selected++; else hit_other++;
      prev_a = a;
    end
    checks++;
    if (hit_selected == 0 || hit_other == 0) begin failures++; $display("write cases not exercised"); end
    $display("writes to the selected entry %0d, to others %0d", hit_selected, hit_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
