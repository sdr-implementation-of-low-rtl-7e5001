// Test of the serial-to-parallel demultiplexer: random bits with random gaps;
// every second strobe must produce sym_valid one clock later with
// {i, q} = {first bit, second bit} of the pair and matching even/odd outputs.
module tb_demux_s2p;
  import sdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic data = 1'b0, data_valid = 1'b0;
  sym_bits_t sym;
  logic sym_valid, even_bit, odd_bit;
  int checks = 0, failures = 0;

  demux_s2p dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic send(input bit b);
    data <= b; data_valid <= 1'b1;
    @(posedge clk);
    data_valid <= 1'b0;
  endtask

  initial begin
    bit e, od;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      e = 1'($urandom); od = 1'($urandom);
      send(e);
      repeat ($urandom_range(2)) begin @(posedge clk); chk(!sym_valid, "no symbol after even bit"); end
      send(od);
      @(posedge clk);
      chk(sym_valid && sym.i == e && sym.q == od && even_bit == e && odd_bit == od,
          $sformatf("pair %0d: got i=%0b q=%0b want %0b %0b", n, sym.i, sym.q, e, od));
      data <= 1'($urandom);
      @(posedge clk);
      chk(!sym_valid, "sym_valid is one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
