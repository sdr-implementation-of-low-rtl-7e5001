// Test of the moving-average low-pass filter (25 taps).  Random input must
// give, two clocks later, the sum of the last 25 inputs shifted right by 4
// (reference computed here from a history of inputs).  A 2 MHz tone
// (25 samples per period) must be cancelled to rounding, and DC of 1000 must
// settle to 1000*25/16.
module tb_low_pass_filter;
  import sdr_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst = 1'b1;
  sample_t x = '0, y;
  int checks = 0, failures = 0;
  int hist [$];

  low_pass_filter #(.LEN(25)) dut (.*);

  always #10 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // drive one sample, then check y against the history
  task automatic step(input sample_t v);
    int s;
    x <= v;
    @(posedge clk); #1;
    hist.push_front(int'(v));
    // y now holds the average of inputs up to two samples back
    s = 0;
    for (int k = 1; k <= 25 && k < hist.size(); k++) s += hist[k];
    chk(int'(y) == (s >>> 4), $sformatf("y %0d vs %0d", y, s >>> 4));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    hist.push_front(0);
    for (int n = 0; n < 300; n++) step(sample_t'($urandom_range(16000) - 8000));
    for (int n = 0; n < 100; n++) step(sample_t'($rtoi(8000.0 * $cos(2.0 * PI * n / 25.0))));
    chk(y > -10 && y < 10, $sformatf("2 MHz tone cancelled: %0d", y));
    for (int n = 0; n < 40; n++) step(16'sd1000);
    chk(y == 16'sd1562, $sformatf("DC gain: %0d", y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
