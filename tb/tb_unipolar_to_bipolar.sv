// Test of the unipolar-to-bipolar converter: all four bit pairs map to
// +-8192 levels one clock later, and the levels hold without a strobe.
module tb_unipolar_to_bipolar;
  import sdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sym_bits_t sym = '0;
  logic sym_valid = 1'b0;
  sym_levels_t lvl;
  logic lvl_valid;
  int checks = 0, failures = 0;

  unipolar_to_bipolar dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 4; k++) begin
        sym <= sym_bits_t'(k); sym_valid <= 1'b1;
        @(posedge clk);
        sym_valid <= 1'b0; sym <= sym_bits_t'(~k);
        @(posedge clk);
        chk(lvl_valid, "valid");
        chk(lvl.i == (k[1] ? 16'sd8192 : -16'sd8192), $sformatf("I level for %0d", k));
        chk(lvl.q == (k[0] ? 16'sd8192 : -16'sd8192), $sformatf("Q level for %0d", k));
        @(posedge clk);
        chk(!lvl_valid && lvl.i == (k[1] ? 16'sd8192 : -16'sd8192), "hold");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
