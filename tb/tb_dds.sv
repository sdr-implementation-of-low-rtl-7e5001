// Test of the DDS at its defaults (50 MHz clock, 1 MHz carrier).  Each output
// sample is compared with 16383*sin and 16383*cos of the phase the
// accumulator held one clock earlier (within 1% of full scale, the table's
// phase quantisation), the sine must cross zero upward every 50 clocks, and
// the cosine must lead the sine by a quarter period (12 or 13 clocks).
module tb_dds;
  import sdr_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst = 1'b1;
  sample_t cos_out, sin_out;
  logic [31:0] phase;
  int checks = 0, failures = 0;

  dds dut (.*);

  always #10 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [31:0] ph_prev;
    sample_t s_prev, c_prev;
    longint t = 0, last_s = -1, last_c = -1;
    int n_per = 0;
    real a, rs, rc;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    ph_prev = phase; s_prev = sin_out; c_prev = cos_out;
    for (int n = 0; n < 5000; n++) begin
      @(posedge clk); #1;
      t++;
      a  = 2.0 * PI * real'(ph_prev) / 4294967296.0;
      rs = 16383.0 * $sin(a);
      rc = 16383.0 * $cos(a);
      chk(real'(sin_out) - rs < 165.0 && rs - real'(sin_out) < 165.0, $sformatf("sin %0d vs %f", sin_out, rs));
      chk(real'(cos_out) - rc < 165.0 && rc - real'(cos_out) < 165.0, $sformatf("cos %0d vs %f", cos_out, rc));
      if (s_prev < 0 && sin_out >= 0) begin
        if (last_s >= 0) begin chk(t - last_s == 50, "carrier period 50 clocks"); n_per++; end
        last_s = t;
      end
      if (c_prev < 0 && cos_out >= 0) last_c = t;
      if (last_s >= 0 && last_c >= 0 && t == last_s)
        chk(last_s - last_c == 12 || last_s - last_c == 13, "cosine leads by a quarter period");
      ph_prev = phase; s_prev = sin_out; c_prev = cos_out;
    end
    chk(n_per > 90, "periods observed");
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
