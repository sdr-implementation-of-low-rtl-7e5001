// Test of the multiplier: random and extreme operands; y must equal
// (a*b) >>> 14, saturated to 16 bits, one clock later.
module tb_multiplier;
  import sdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t a = '0, b = '0, y;
  int checks = 0, failures = 0;

  multiplier dut (.*);

  always #5 clk = ~clk;

  function automatic longint expect_y(input longint p, input longint q);
    longint r;
    r = (p * q) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic try(input sample_t va, input sample_t vb);
    a <= va; b <= vb;
    @(posedge clk);
    #1;
    checks++;
    if (longint'(y) != expect_y(longint'(va), longint'(vb))) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", va, vb, y);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    try(16'sd8192, 16'sd16383);   // level times carrier peak
    try(-16'sd8192, 16'sd16383);
    try(16'sh8000, 16'sh8000);     // saturates high
    try(16'sh7fff, 16'sh8000);     // saturates low
    try(16'sd100, -16'sd3);        // rounding toward -inf
    for (int n = 0; n < 500; n++) try(sample_t'($urandom), sample_t'($urandom));
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
