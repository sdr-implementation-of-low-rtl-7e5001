// Test of the down-sampler at a reduced symbol length (SPS = 16, ALIGN = 5).
// With sym_en every 16 clocks, dec_en must pulse at clocks ALIGN (mod 16)
// after each strobe, sel must be low for clocks 5..12 after each strobe and
// high for 13..20 (mod 16), and data must be captured from mux_out at clocks
// ALIGN + SPS/4 and ALIGN + 3*SPS/4 after a strobe, with one-cycle
// data_valid.  mux_out is driven with a fresh random bit every clock
// so a capture at any other clock is detected.  No output before the first
// strobe.
module tb_down_sampler;
  localparam int SPS = 16, ALIGN = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic sym_en = 1'b0, mux_out = 1'b0;
  logic dec_en, sel, data, data_valid;
  int checks = 0, failures = 0;

  down_sampler #(.SPS(SPS), .ALIGN(ALIGN)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    bit hist [$];
    int n_cap = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (20) begin @(posedge clk); #1; chk(!data_valid, "nothing before first strobe"); end
    for (int t = 0; t < SPS * 30; t++) begin
      // t counts clocks since the strobe cycle (t = 0 has sym_en high)
      sym_en  <= (t % SPS == 0);
      mux_out <= 1'($urandom);
      @(posedge clk); #1;
      hist.push_front(mux_out);
      if (t >= 1) begin
        int ph;
        ph = ((t + 1 - ALIGN) % SPS + SPS) % SPS;   // phase in the next cycle
        // sel is combinational from the phase counter: check it for cycle t+1
        chk(sel == (ph >= SPS / 2), $sformatf("sel at t=%0d", t + 1));
        chk(dec_en == (ph == 0), $sformatf("dec_en at t=%0d", t + 1));
        ph = ((t - ALIGN) % SPS + SPS) % SPS;       // phase of cycle t
        if (ph == SPS / 4 || ph == 3 * SPS / 4) begin
          chk(data_valid && data == hist[0], $sformatf("capture at t=%0d", t));
          n_cap++;
        end else
          chk(!data_valid, $sformatf("no capture at t=%0d", t));
      end
    end
    chk(n_cap >= 58, "two captures per symbol");
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
