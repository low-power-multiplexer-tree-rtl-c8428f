// tb_mux2_cell: self-checking test of the W-bit 2-to-1 MUX cell.
// Drives random data on both inputs with both values of s, at the default
// width and at width 1, and compares y against the input that s names.
module tb_mux2_cell;
  localparam int unsigned W = 128;

  logic [W-1:0] a, b, y;
  logic         s;
  logic         a1, b1, y1, s1;
  int unsigned  checks = 0, failures = 0;

  mux2_cell #(.W(W)) dut (.in0(a), .in1(b), .s(s), .y(y));
  mux2_cell #(.W(1)) dut1 (.in0(a1), .in1(b1), .s(s1), .y(y1));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int k = 0; k < W / 32; k++) begin
        a[k*32 +: 32] = $urandom;
        b[k*32 +: 32] = $urandom;
      end
      s = 1'($urandom);
      {a1, b1, s1} = 3'(i);
      #1;
      checks++;
      if (y !== (s ? b : a)) begin
        failures++;
        $display("mismatch s=%0d", s);
      end
      checks++;
      if (y1 !== (s1 ? b1 : a1)) begin
        failures++;
        $display("mismatch width 1: a=%0d b=%0d s=%0d y=%0d", a1, b1, s1, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
