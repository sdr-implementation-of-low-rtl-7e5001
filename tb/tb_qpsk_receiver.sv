// Test of the receiver unit with an independently generated QPSK signal.
// The testbench makes rectangular symbols of 2000 clocks, S = 8192*(I*cos -
// Q*sin) at 1 MHz (50 clocks per period) with I, Q = +-1 for bits 1/0, and
// supplies carriers 16383*cos/sin delayed by 48 clocks, the band-pass
// filter's delay.  sym_en marks each symbol start, so the receiver's window
// offset ALIGN is 64 clocks (band-pass 48, multiplier 1, low-pass 14,
// decision 1).  The received stream must be I0, Q0, I1, Q1, ... with I_k
// valid exactly 566 and Q_k 1566 clocks after symbol k starts.  The low-pass
// outputs at the sampling instants must have the sign of I and -Q.
module tb_qpsk_receiver;
  import sdr_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int SPS = 2000, NSYM = 40;
  logic clk = 1'b0, rst = 1'b1;
  sample_t rx_in = '0, cos_carrier = '0, sin_carrier = '0;
  logic sym_en = 1'b0;
  sample_t bpf_out, i_mix, q_mix, i_lpf, q_lpf;
  logic i_dec, q_dec, data, data_valid;
  int checks = 0, failures = 0;

  qpsk_receiver #(.ALIGN(1063)) dut (.*);

  always #10 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  bit isym [NSYM + 4], qsym [NSYM + 4];
  int t = -1;                 // clock index; symbol k spans [k*SPS, (k+1)*SPS)
  int nrx = 0, n_startup = 0;

  initial for (int k = 0; k < NSYM + 4; k++) begin
    isym[k] = 1'($urandom); qsym[k] = 1'($urandom);
  end

  always @(posedge clk) begin
    if (!rst) begin
      automatic int tn = t + 1;          // index of the next cycle
      automatic int k = tn / SPS;
      automatic real w = 2.0 * PI / 50.0;
      automatic real iv = isym[k] ? 1.0 : -1.0;
      automatic real qv = qsym[k] ? 1.0 : -1.0;
      rx_in       <= sample_t'($rtoi($floor(8192.0 * (iv * $cos(w * tn) - qv * $sin(w * tn)) + 0.5)));
      cos_carrier <= sample_t'($rtoi($floor(16383.0 * $cos(w * (tn - 48)) + 0.5)));
      sin_carrier <= sample_t'($rtoi($floor(16383.0 * $sin(w * (tn - 48)) + 0.5)));
      sym_en      <= (tn % SPS == 0);
      t <= tn;
      if (t >= 0 && t < 1564 && data_valid) begin
        n_startup++;             // output before the first symbol centre
      end else if (t >= 0 && data_valid) begin
        automatic int sk = nrx / 2;
        automatic bit want = (nrx % 2 == 0) ? isym[sk] : qsym[sk];
        automatic int when = sk * SPS + ((nrx % 2 == 0) ? 1564 : 2564);
        chk(data == want, $sformatf("bit %0d value", nrx));
        chk(t == when, $sformatf("bit %0d at %0d, expected %0d", nrx, t, when));
        nrx++;
      end
      // sign of the low-pass outputs at the I sampling instant of each symbol
      if (t >= 0 && t % SPS == 1062) begin
        automatic int sk = t / SPS;
        chk((i_lpf >= 0) == isym[sk], $sformatf("i_lpf sign symbol %0d: %0d", sk, i_lpf));
        chk((q_lpf < 0) == qsym[sk], $sformatf("q_lpf sign symbol %0d: %0d", sk, q_lpf));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (nrx == 2 * NSYM);
    checks++;
    if (n_startup > 1) begin failures++; $display("FAIL %0d start-up outputs", n_startup); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NSYM + 4) * SPS) @(posedge clk);
    $display("FAIL: watchdog, %0d bits", nrx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
