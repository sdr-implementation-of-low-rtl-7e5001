// End-to-end test of the QPSK transceiver at its default parameters.
//
// Runs NBITS bits through transmitter and looped-back receiver.  Every
// transmitted bit (tx_data at tx_data_valid) is queued with its time; every
// received bit must equal the queued bit whose time is exactly LATENCY clocks
// earlier.  Received bits that precede the first transmitted bit's arrival are
// the receiver's start-up output and are skipped (at most 5).  Also checked:
// the bit period (1000 clocks = 50 kb/s at 50 MHz), the symbol period, that
// all four constellation points (I,Q = 00, 01, 10, 11) were sent, that the
// carrier has 50 samples per period (1 MHz), that the modulated signal
// never saturates, and that every kind of carrier phase change between
// consecutive symbols occurred: none, +-90 degrees (one of I, Q flips) and
// 180 degrees (both flip).  At each decision instant (the symbol centre,
// a fixed time before each capture) the low-pass output of each branch, signed by the
// bit, must exceed 80% of its nominal 6400 (= 8192/2 * 25/16): the eye is
// open at the centre.
module tb_sdr_transceiver;
  import sdr_pkg::*;

  localparam int NBITS   = 120;
  localparam int SPS     = 2 * CLK_HZ_DEF / BIT_HZ_DEF;
  // symbol centre at the low-pass outputs, then a quarter symbol to the I capture
  localparam int ALIGN   = SPS / 2 + SPS / OS_DEF + SPS * 4 / 2 + 1 + 65;
  localparam int LATENCY = ALIGN + SPS / 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic tx_data, tx_data_valid, i_bit, q_bit, tx_sym_valid;
  sample_t cos_carrier, sin_carrier, i_shaped, q_shaped, i_mod, q_mod, mod_out;
  sample_t rx_bpf, rx_i_mix, rx_q_mix, rx_i_lpf, rx_q_lpf;
  logic rx_i_dec, rx_q_dec, rx_data, rx_data_valid;

  sdr_transceiver dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  longint cycle = 0;
  bit     txq_bit [$];
  longint txq_t   [$];
  int     n_tx = 0, n_rx_match = 0, n_startup = 0;
  int     quad [4] = '{0, 0, 0, 0};
  longint last_tx_t = -1, last_sym_t = -1;
  int     n_sat = 0;
  longint last_cos_rise = -1;
  int     n_cos_period = 0;
  sample_t prev_cos = '0;
  int     n_ph0 = 0, n_ph90 = 0, n_ph180 = 0;
  logic [1:0] last_sym = '0;
  bit     have_sym = 0;
  int     min_eye = 32767;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // history of the low-pass outputs, to look up their values at the decision
  // instant of each received bit (a quarter or three quarters of a symbol
  // before its capture)
  localparam int HW = 4096;
  sample_t hist_i [HW], hist_q [HW];
  always @(posedge clk) begin
    hist_i[int'(cycle % HW)] <= rx_i_lpf;
    hist_q[int'(cycle % HW)] <= rx_q_lpf;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (tx_data_valid) begin
        txq_bit.push_back(tx_data);
        txq_t.push_back(cycle);
        n_tx++;
        if (last_tx_t >= 0) check(cycle - last_tx_t == SPS / 2, "bit period");
        last_tx_t <= cycle;
      end
      if (tx_sym_valid) begin
        quad[{i_bit, q_bit}]++;
        if (have_sym) begin
          case ((last_sym ^ {i_bit, q_bit}))
            2'b00:        n_ph0++;
            2'b11:        n_ph180++;
            default:      n_ph90++;
          endcase
        end
        last_sym <= {i_bit, q_bit};
        have_sym <= 1'b1;
        if (last_sym_t >= 0) check(cycle - last_sym_t == SPS, "symbol period");
        last_sym_t <= cycle;
      end
      if (mod_out == 16'sh7fff || mod_out == 16'sh8000) n_sat++;
      if (prev_cos < 0 && cos_carrier >= 0) begin
        if (last_cos_rise >= 0) begin
          check(cycle - last_cos_rise == 50, "carrier period");
          n_cos_period++;
        end
        last_cos_rise <= cycle;
      end
      prev_cos <= cos_carrier;
      if (rx_data_valid) begin
        if (txq_t.size() > 0 && txq_t[0] == cycle - LATENCY) begin
          check(rx_data == txq_bit[0], $sformatf("rx bit %0d", n_rx_match));
          begin : eye
            // low-pass output of this bit's branch at its decision instant:
            // the capture was one clock ago at phase SPS/4 (I) or 3*SPS/4 (Q)
            automatic bit is_i = (n_rx_match % 2 == 0);
            automatic longint tdec = cycle - 1 - (is_i ? SPS / 4 : 3 * SPS / 4);
            automatic int v = is_i ? int'(hist_i[int'(tdec % HW)]) : -int'(hist_q[int'(tdec % HW)]);
            if (!txq_bit[0]) v = -v;
            if (v < min_eye) min_eye = v;
            check(v > 5120, $sformatf("eye opening %0d at bit %0d", v, n_rx_match));
          end
          void'(txq_t.pop_front());
          void'(txq_bit.pop_front());
          n_rx_match++;
        end else if (n_rx_match == 0 && n_startup < 5) begin
          n_startup++;
        end else begin
          if (failures < 3) $display("rx %0d at %0d, head tx %0d at %0d", rx_data, cycle, txq_bit[0], txq_t[0]);
          check(0, "received bit with no transmitted bit at the fixed delay");
        end
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait (n_rx_match == NBITS);
    repeat (2) @(posedge clk);
    check(n_tx >= NBITS, "bits transmitted");
    for (int k = 0; k < 4; k++) begin
      $display("constellation point I=%0d Q=%0d sent %0d times", k >> 1, k & 1, quad[k]);
      check(quad[k] > 0, "all four constellation points used");
    end
    check(n_sat == 0, "no saturation of the modulated signal");
    $display("phase changes between symbols: 0 deg %0d, 90 deg %0d, 180 deg %0d", n_ph0, n_ph90, n_ph180);
    check(n_ph0 > 0 && n_ph90 > 0 && n_ph180 > 0, "every kind of phase change occurred");
    $display("smallest eye opening at a sampling instant: %0d (nominal 6400)", min_eye);
    check(n_cos_period > 100, "carrier observed");
    $display("bits sent %0d, received and matched %0d, start-up outputs %0d, latency %0d clocks",
             n_tx, n_rx_match, n_startup, LATENCY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NBITS + 10) * SPS / 2) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d bits matched", n_rx_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
