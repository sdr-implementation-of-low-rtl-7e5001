// Test of the raised-cosine pulse shaper (8 samples per symbol, span 4,
// roll-off 0.5, a shaper sample every 4 clocks here).
// 1. A single symbol of level 8192 must produce, shaper sample by shaper
//    sample, 8192 * h(t) with h the raised-cosine impulse response evaluated
//    independently here (within rounding), peaking 1 + 16 shaper samples after
//    injection.
// 2. A random symbol stream must show zero inter-symbol interference: at each
//    symbol's peak sample the output equals that symbol's level.
module tb_pulse_shaping_filter;
  import sdr_pkg::*;
  localparam int OS = 8, SPAN = 4, DIV = 4;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst = 1'b1;
  sample_t lvl = '0;
  logic lvl_valid = 1'b0, os_en = 1'b0;
  sample_t y;
  int checks = 0, failures = 0;
  int ospos = 0;               // shaper samples since reset release

  pulse_shaping_filter #(.OS(OS), .SPAN(SPAN), .BETA_PCT(50)) dut (.*);

  always #5 clk = ~clk;

  // os_en every DIV clocks
  int div = 0;
  always @(posedge clk) begin
    if (!rst) begin
      div   <= (div == DIV - 1) ? 0 : div + 1;
      os_en <= (div == DIV - 1);
      if (os_en) ospos <= ospos + 1;
    end
  end

  function automatic real h(input real t);     // beta = 0.5
    real s, d;
    if (t == 0.0) return 1.0;
    if (t == 1.0 || t == -1.0) return 0.0;     // limit pi/4*sinc(1) = 0
    s = $sin(PI * t) / (PI * t);
    d = 1.0 - t * t;
    return s * $cos(PI * 0.5 * t) / d;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // wait until just after the next os_en edge
  task automatic next_sample();
    @(posedge clk iff os_en);
    #1;
  endtask

  initial begin
    sample_t sym [64];
    int e;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // 1. impulse response
    next_sample();
    @(posedge clk); lvl <= 16'sd8192; lvl_valid <= 1'b1;
    @(posedge clk); lvl_valid <= 1'b0;
    next_sample();                                // impulse enters here: tap 0 out
    for (int n = 0; n <= OS * SPAN + 2; n++) begin
      real ref_v;
      ref_v = (n <= OS * SPAN) ? 8192.0 * h((n - OS * SPAN / 2) / real'(OS)) : 0.0;
      chk(y >= $rtoi(ref_v) - 2 && y <= $rtoi(ref_v) + 2,
          $sformatf("impulse response sample %0d: %0d vs %f", n, y, ref_v));
      if (n == OS * SPAN / 2) chk(y == 16'sd8192, "peak equals level 16 samples after injection");
      next_sample();
    end
    // 2. random symbols, one per OS shaper samples
    for (int k = 0; k < 64; k++) begin
      sym[k] = $urandom_range(1) ? 16'sd8192 : -16'sd8192;
      @(posedge clk); lvl <= sym[k]; lvl_valid <= 1'b1;
      @(posedge clk); lvl_valid <= 1'b0;
      next_sample();                              // symbol k injected
      if (k >= 2) begin
        // symbol k-2 injected 2*OS samples ago: its peak is the current output
        e = int'(y) - int'(sym[k-2]);
        chk(e >= -4 && e <= 4, $sformatf("ISI at symbol %0d: %0d vs %0d", k - 2, y, sym[k-2]));
      end
      repeat (OS - 1) next_sample();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
