// Test of the decision circuit, plain and inverted: random samples and the
// boundary values -1, 0, +1 and the extremes.  With `en` high the registered
// bit is the sign test x >= 0 (or x < 0 when inverted); with `en` low the
// previous decision must hold whatever x does.
module tb_decision_circuit;
  import sdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0;
  sample_t x = '0;
  logic b_pos, b_neg;
  int checks = 0, failures = 0;

  decision_circuit #(.INVERT(1'b0)) dut_p (.clk, .rst, .en, .x, .bit_out(b_pos));
  decision_circuit #(.INVERT(1'b1)) dut_n (.clk, .rst, .en, .x, .bit_out(b_neg));

  always #5 clk = ~clk;

  task automatic try(input sample_t v);
    bit hp, hn;
    x <= v; en <= 1'b1;
    @(posedge clk);
    #1;
    checks += 2;
    if (b_pos !== (v >= 0)) begin failures++; $display("FAIL plain %0d", v); end
    if (b_neg !== (v < 0))  begin failures++; $display("FAIL inverted %0d", v); end
    hp = b_pos; hn = b_neg;
    x <= -v - 1; en <= 1'b0;              // opposite sign, not enabled
    @(posedge clk);
    #1;
    checks++;
    if (b_pos !== hp || b_neg !== hn) begin failures++; $display("FAIL hold after %0d", v); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    try(0); try(-1); try(1); try(16'sh7fff); try(16'sh8000); try(0);
    for (int n = 0; n < 300; n++) try(sample_t'($urandom));
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
