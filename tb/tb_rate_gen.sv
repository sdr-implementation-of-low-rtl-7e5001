// Test of the rate generator at a reduced clock (1600 Hz clock, 100 b/s, 8
// shaper samples per symbol, so 32 clocks per symbol).  A reference counter
// in the testbench predicts every enable; periods and alignment of bit_en,
// sym_en and os_en are checked over many symbols.
module tb_rate_gen;
  localparam int CLK_HZ = 1600, BIT_HZ = 100, OS = 8;
  localparam int SPS = 2 * CLK_HZ / BIT_HZ;

  logic clk = 1'b0, rst = 1'b1;
  logic bit_en, sym_en, os_en;
  int checks = 0, failures = 0;
  int t = 0;                // clocks since reset release
  int n_bit = 0, n_sym = 0, n_os = 0;

  rate_gen #(.CLK_HZ(CLK_HZ), .BIT_HZ(BIT_HZ), .OS(OS)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst) begin
      // counter value c = t - 1 (mod SPS) is decoded one clock late
      automatic int c = (t + SPS - 1) % SPS;
      if (t >= 1) begin
        checks++;
        if (sym_en !== (c == 0) || bit_en !== (c == 0 || c == SPS / 2) ||
            os_en !== (c % (SPS / OS) == 0)) begin
          failures++;
          $display("FAIL t=%0d c=%0d bit=%0b sym=%0b os=%0b", t, c, bit_en, sym_en, os_en);
        end
      end
      n_bit += int'(bit_en); n_sym += int'(sym_en); n_os += int'(os_en);
      t <= t + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (SPS * 20 + 1) @(posedge clk);
    checks++;
    if (n_sym != 20 || n_bit != 40 || n_os != 160) begin
      failures++;
      $display("FAIL counts sym=%0d bit=%0d os=%0d", n_sym, n_bit, n_os);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
