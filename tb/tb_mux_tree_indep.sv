// tb_mux_tree_indep: self-checking test of the MUX tree with independent
// selection signals. Two instances: 16 inputs x 8 bits and the default
// 256 x 128. Each step loads random data and a fully random per-cell
// selection vector. The expected output is found by walking from the output
// cell down: at each level the walk reads the current cell's selection bit to
// pick the left (0) or right (1) child, which gives the input index. A second
// phase sets only the cells on the path of a random address and fills every
// other cell with noise; the output must be that address's input.
module tb_mux_tree_indep;
  import mux_tree_pkg::*;

  localparam int unsigned NA = 16,  WA = 8;
  localparam int unsigned NB = 256, WB = 128;

  logic [NA-2:0]         sel_a;
  logic [NA-1:0][WA-1:0] din_a;
  logic [WA-1:0]         dout_a;
  logic [NB-2:0]         sel_b;
  logic [NB-1:0][WB-1:0] din_b;
  logic [WB-1:0]         dout_b;
  int unsigned checks = 0, failures = 0;

  mux_tree_indep #(.N(NA), .W(WA)) dut_a (.sel(sel_a), .din(din_a), .dout(dout_a));
  mux_tree_indep #(.N(NB), .W(WB)) dut_b (.sel(sel_b), .din(din_b), .dout(dout_b));

  // Input index reached by following the selection bits from the output.
  function automatic int unsigned walk(int unsigned n, logic [NB-2:0] sel);
    int unsigned j = 0;
    for (int l = $clog2(n) - 1; l >= 0; l--)
      j = 2 * j + int'(sel[sel_offset(n, l) + j]);
    return j;
  endfunction

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic randomize_data();
    for (int i = 0; i < NA; i++) din_a[i] = WA'($urandom);
    for (int i = 0; i < NB; i++)
      for (int k = 0; k < WB / 32; k++) din_b[i][k*32 +: 32] = $urandom;
  endtask

  task automatic check(int unsigned ia, int unsigned ib);
    #1;
    checks++;
    if (dout_a !== din_a[ia]) begin
      failures++;
      $display("small tree: expected input %0d", ia);
    end
    checks++;
    if (dout_b !== din_b[ib]) begin
      failures++;
      $display("large tree: expected input %0d", ib);
    end
  endtask

  initial begin
    logic [NB-2:0] tmp;
    // Phase 1: random selection vectors.
    for (int t = 0; t < 300; t++) begin
      randomize_data();
      for (int k = 0; k < NB - 1; k++) tmp[k] = 1'($urandom);
      sel_a = tmp[NA-2:0];
      sel_b = tmp;
      check(walk(NA, {{(NB - NA){1'b0}}, sel_a}), walk(NB, sel_b));
    end
    // Phase 2: only the path of an address is set; all else is noise.
    for (int t = 0; t < 300; t++) begin
      int unsigned aa, ab;
      randomize_data();
      aa = $urandom_range(NA - 1);
      ab = $urandom_range(NB - 1);
      for (int k = 0; k < NB - 1; k++) tmp[k] = 1'($urandom);
      sel_a = tmp[NA-2:0];
      sel_b = tmp;
      for (int l = 0; l < $clog2(NA); l++) sel_a[sel_offset(NA, l) + (aa >> (l + 1))] = aa[l];
      for (int l = 0; l < $clog2(NB); l++) sel_b[sel_offset(NB, l) + (ab >> (l + 1))] = ab[l];
      check(aa, ab);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
