// Test of the receive band-pass filter (95 taps, 50 MHz, centred on 1 MHz).
// A 1 MHz tone of amplitude 8000 must come out with the same amplitude (within
// 2%) and delayed by exactly 48 clocks (checked sample by sample against the
// input 48 clocks earlier); DC of 8000 and a 6 MHz tone must be attenuated
// below 5% of the input.
module tb_band_pass_filter;
  import sdr_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst = 1'b1;
  sample_t x = '0, y;
  int checks = 0, failures = 0;

  band_pass_filter dut (.*);

  always #10 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic sample_t tone(input int n, input real f_mhz, input real amp);
    return sample_t'($rtoi($floor(amp * $cos(2.0 * PI * f_mhz * n / 50.0) + 0.5)));
  endfunction

  initial begin
    int maxabs;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // 1 MHz passband
    for (int n = 0; n < 600; n++) begin
      x <= tone(n, 1.0, 8000.0);
      @(posedge clk); #1;
      // y now reflects inputs up to index n; group delay 47 + register 1
      if (n >= 200) begin
        int e;
        e = int'(y) - int'(tone(n - 47, 1.0, 8000.0));
        chk(e > -160 && e < 160, $sformatf("1 MHz at %0d: %0d vs %0d", n, y, tone(n - 47, 1.0, 8000.0)));
      end
    end
    // DC
    maxabs = 0;
    for (int n = 0; n < 400; n++) begin
      x <= 16'sd8000;
      @(posedge clk); #1;
      if (n >= 200 && (y > maxabs || -y > maxabs)) maxabs = (y < 0) ? -y : y;
    end
    chk(maxabs < 400, $sformatf("DC rejected: %0d", maxabs));
    // 6 MHz
    maxabs = 0;
    for (int n = 0; n < 400; n++) begin
      x <= tone(n, 6.0, 8000.0);
      @(posedge clk); #1;
      if (n >= 200 && (y > maxabs || -y > maxabs)) maxabs = (y < 0) ? -y : y;
    end
    chk(maxabs < 400, $sformatf("6 MHz rejected: %0d", maxabs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
