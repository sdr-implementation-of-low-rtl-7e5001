// Test of the summer: y = i_mod - q_mod, saturated to 16 bits, one clock
// later, for random and extreme operands.
module tb_iq_sum;
  import sdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t i_mod = '0, q_mod = '0, y;
  int checks = 0, failures = 0;

  iq_sum dut (.*);

  always #5 clk = ~clk;

  task automatic try(input sample_t vi, input sample_t vq);
    int r;
    i_mod <= vi; q_mod <= vq;
    @(posedge clk);
    #1;
    r = int'(vi) - int'(vq);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    checks++;
    if (int'(y) != r) begin failures++; $display("FAIL %0d - %0d -> %0d", vi, vq, y); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    try(16'sd5000, 16'sd3000);
    try(16'sd30000, -16'sd30000);
    try(-16'sd30000, 16'sd30000);
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
