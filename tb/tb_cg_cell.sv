// tb_cg_cell: self-checking test of the clock gating cell.
// The enable is changed at random points of both clock phases. Expected
// behaviour: gclk is low whenever clk is low; while clk is high, gclk equals
// the enable as it was just before the rising edge, even if the enable moves
// during the high phase. The number of gated pulses is compared with the
// number of rising edges that saw the enable high.
module tb_cg_cell;
  logic clk = 0, en = 0, gclk;
  logic en_at_rise = 0;
  int unsigned checks = 0, failures = 0;
  int unsigned pulses = 0, expected_pulses = 0, blocked = 0;

  cg_cell dut (.clk(clk), .en(en), .gclk(gclk));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) pulses++;

  initial begin
    for (int c = 0; c < 500; c++) begin
      // low phase: 10 time units, enable may change anywhere in it
      repeat ($urandom_range(1, 8)) #1;
      en = 1'($urandom);
      #1;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk high while clk low"); end
      #9;
      // rising edge
      en_at_rise = en;
      if (en) expected_pulses++; else blocked++;
      clk = 1;
      #1;
      checks++;
      if (gclk !== en_at_rise) begin failures++; $display("cycle %0d: gclk=%0d expected %0d", c, gclk, en_at_rise); end
      // enable changes during the high phase must not affect gclk
      repeat ($urandom_range(1, 4)) #1;
      en = 1'($urandom);
      #1;
      checks++;
      if (gclk !== en_at_rise) begin failures++; $display("cycle %0d: gclk followed enable in high phase", c); end
      repeat ($urandom_range(1, 3)) #1;
      clk = 0;
      #1;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("gclk did not fall"); end
    end
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("gated pulses %0d, expected %0d", pulses, expected_pulses);
    end
    checks++;
    if (blocked == 0) begin failures++; $display("no blocked edge exercised"); end
    $display("gated pulses %0d, blocked edges %0d", pulses, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
