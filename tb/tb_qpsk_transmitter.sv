// Test of the transmitter unit at its defaults (50 MHz, 50 kb/s, 1 MHz
// carrier, 8 shaper samples per symbol); the testbench drives the bit and
// shaper enables itself.  Checked:
//  - each symbol's even/odd bits are the two serial bits just sent;
//  - 16 shaper samples after a symbol enters the shaper, i_shaped and q_shaped
//    equal +-8192 for bits 1/0 (zero inter-symbol interference, +-4);
//  - every modulated sample equals I*cos - Q*sin computed here from the
//    shaped levels and carriers two clocks earlier (the two register stages);
//  - i_mod and q_mod are the shaped levels times cos and sin one clock earlier;
//  - the modulated signal reaches the expected peak amplitude region.
module tb_qpsk_transmitter;
  import sdr_pkg::*;
  localparam int SPB = 1000, OSDIV = 250, NSYM = 40;
  logic clk = 1'b0, rst = 1'b1;
  logic bit_en = 1'b0, os_en = 1'b0;
  logic data, data_valid, even_bit, odd_bit, sym_valid;
  sample_t i_shaped, q_shaped, cos_carrier, sin_carrier, i_mod, q_mod, tx_out;
  int checks = 0, failures = 0;

  qpsk_transmitter dut (.*);

  always #10 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic int mul14(input sample_t a, input sample_t b);
    return int'((longint'(a) * longint'(b)) >>> 14);
  endfunction

  int t = 0, n_os = 0, n_sym = 0, peak_abs = 0;
  bit  bits [$];
  int  peak_at [$];           // shaper sample index of each symbol's peak
  bit  pi_q [$], pq_q [$];
  sample_t ish1, qsh1, c1, s1, ish2, qsh2, c2, s2;

  // enables: bit_en every SPB clocks, os_en every OSDIV clocks, both at t = 0
  always @(posedge clk) begin
    if (rst) t <= 0;
    else     t <= t + 1;
    bit_en <= !rst && ((t + 1) % SPB == 0);
    os_en  <= !rst && ((t + 1) % OSDIV == 0);
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (data_valid) bits.push_back(data);
      if (sym_valid) begin
        chk(bits.size() >= 2 && even_bit == bits[bits.size()-2] && odd_bit == bits[bits.size()-1],
            "symbol bits are the last two serial bits");
        // level reaches the shaper two clocks later; it enters at the next os_en
        peak_at.push_back(n_os + 16);
        pi_q.push_back(even_bit);
        pq_q.push_back(odd_bit);
        n_sym++;
      end
      if (os_en) begin
        n_os++;
      end
      // after the os_en edge whose index is a pending peak, check the levels
      if (peak_at.size() > 0 && n_os == peak_at[0] + 1 && !os_en) begin
        int ei, eq;
        ei = int'(i_shaped) - (pi_q[0] ? 8192 : -8192);
        eq = int'(q_shaped) - (pq_q[0] ? 8192 : -8192);
        chk(ei >= -4 && ei <= 4 && eq >= -4 && eq <= 4,
            $sformatf("shaped peak %0d/%0d for bits %0b%0b", i_shaped, q_shaped, pi_q[0], pq_q[0]));
        void'(peak_at.pop_front()); void'(pi_q.pop_front()); void'(pq_q.pop_front());
      end
      if (t > 4) begin
        chk(int'(i_mod) == mul14(ish1, c1) && int'(q_mod) == mul14(qsh1, s1), "branch products");
        chk(int'(tx_out) == mul14(ish2, c2) - mul14(qsh2, s2), "S = I*cos - Q*sin");
      end
      if ((tx_out < 0 ? -tx_out : tx_out) > peak_abs) peak_abs = (tx_out < 0) ? -tx_out : tx_out;
      ish2 <= ish1; qsh2 <= qsh1; c2 <= c1; s2 <= s1;
      ish1 <= i_shaped; qsh1 <= q_shaped; c1 <= cos_carrier; s1 <= sin_carrier;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (n_sym == NSYM);
    repeat (5 * 2 * SPB) @(posedge clk);
    chk(peak_abs > 8192 && peak_abs < 32767, $sformatf("modulated peak %0d", peak_abs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NSYM + 10) * 2 * SPB) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
