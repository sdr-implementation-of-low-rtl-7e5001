// End-to-end test of the transceiver at two other data rates, 25 kb/s and
// 100 kb/s, with the clock, carrier and filters at their defaults.  Each
// instance's received bits must equal its transmitted bits at the fixed delay
// ALIGN + SPS/4, with ALIGN = SPS/2 + SPS/OS + 2*SPS + 66 as the top derives
// it; at most five received-bit strobes may precede the first real bit.
module tb_sdr_transceiver_rates;
  import sdr_pkg::*;

  localparam int NRATES = 2;
  localparam int RATES [NRATES] = '{25_000, 100_000};
  localparam int NBITS = 60;
  localparam int WATCHDOG = (NBITS + 12) * (CLK_HZ_DEF / 25_000);   // slowest rate

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int matched [NRATES];
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar r = 0; r < NRATES; r++) begin : g_rate
    localparam int SPS     = 2 * CLK_HZ_DEF / RATES[r];
    localparam int ALIGN   = SPS / 2 + SPS / OS_DEF + 2 * SPS + 1 + 65;
    localparam int LATENCY = ALIGN + SPS / 4;

    logic tx_data, tx_data_valid, i_bit, q_bit, tx_sym_valid;
    sample_t cos_carrier, sin_carrier, i_shaped, q_shaped, i_mod, q_mod, mod_out;
    sample_t rx_bpf, rx_i_mix, rx_q_mix, rx_i_lpf, rx_q_lpf;
    logic rx_i_dec, rx_q_dec, rx_data, rx_data_valid;

    sdr_transceiver #(.BIT_HZ(RATES[r])) dut (.*);

    bit     qb [$];
    longint qt [$];
    int     n_startup = 0;
    longint last_tx = -1;

    always @(posedge clk) begin
      if (!rst) begin
        if (tx_data_valid) begin
          if (last_tx >= 0) begin
            checks++;
            if (cycle - last_tx != longint'(SPS / 2)) begin
              failures++;
              $display("FAIL rate %0d: bit period %0d", RATES[r], cycle - last_tx);
            end
          end
          last_tx <= cycle;
          qb.push_back(tx_data);
          qt.push_back(cycle);
        end
        if (rx_data_valid) begin
          if (qt.size() > 0 && qt[0] == cycle - longint'(LATENCY)) begin
            checks++;
            if (rx_data != qb[0]) begin
              failures++;
              $display("FAIL rate %0d: bit %0d", RATES[r], matched[r]);
            end
            void'(qt.pop_front());
            void'(qb.pop_front());
            matched[r]++;
          end else if (matched[r] == 0 && n_startup < 5) begin
            n_startup++;
          end else begin
            checks++;
            failures++;
            $display("FAIL rate %0d: received bit at %0d off the fixed delay", RATES[r], cycle);
          end
        end
      end
    end
  end

  initial begin
    matched = '{default: 0};
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait (matched[0] >= NBITS && matched[1] >= NBITS);
    for (int r = 0; r < NRATES; r++)
      $display("rate %0d b/s: %0d bits received correctly", RATES[r], matched[r]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("FAIL: watchdog, matched %0d and %0d", matched[0], matched[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
