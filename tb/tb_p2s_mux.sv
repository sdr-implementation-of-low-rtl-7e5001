// Test of the I/Q multiplexer: for random inputs the registered output is
// the I bit when sel is low and the Q bit when sel is high.
module tb_p2s_mux;
  logic clk = 1'b0, rst = 1'b1;
  logic i_bit = 1'b0, q_bit = 1'b0, sel = 1'b0, out;
  int checks = 0, failures = 0;

  p2s_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    bit ei, eq, es;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 400; n++) begin
      ei = 1'($urandom); eq = 1'($urandom); es = 1'($urandom);
      i_bit <= ei; q_bit <= eq; sel <= es;
      @(posedge clk);
      #1;
      checks++;
      if (out !== (es ? eq : ei)) begin failures++; $display("FAIL n=%0d", n); end
    end
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
