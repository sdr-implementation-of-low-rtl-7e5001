// Band-pass filter at the receiver input.
//
// A TAPS-tap FIR centred on the carrier: h[n] = g * w[n] * cos(2*pi*fc/fs *
// (n - (TAPS-1)/2)), with w a Hann window and g chosen for unity gain at fc.
// It passes the QPSK band around the 1 MHz carrier and rejects DC and the
// high-frequency steps of the held shaper samples.  It runs on every sample
// clock; its delay is (TAPS-1)/2 + 1 clocks.  The default 95 taps at 50 MHz
// make the path from the DDS output to the receive multipliers (transmit
// multiplier 1, summer 1, filter register 1, group delay 47) exactly 50
// samples, one carrier period, so the carrier phase the receiver sees equals
// the phase of the DDS output it is multiplied with, and the
// receiver can reuse the transmitter's DDS.  The receiver having a band-pass
// filter follows the design's specification; its type and length are this
// implementation's choice.
module band_pass_filter
  import sdr_pkg::*;
#(
  parameter int TAPS       = 95,
  parameter int CLK_HZ     = sdr_pkg::CLK_HZ_DEF,
  parameter int CARRIER_HZ = sdr_pkg::CARRIER_HZ_DEF
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t x,
  output sample_t y
);
  typedef sample_t coef_t [TAPS];

  function automatic coef_t make_coef();
    coef_t c;
    real pi, w [TAPS], h [TAPS], gain;
    pi   = 3.14159265358979;
    gain = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      w[n] = 0.5 - 0.5 * $cos(2.0 * pi * (n + 1) / (TAPS + 1));
      h[n] = w[n] * $cos(2.0 * pi * CARRIER_HZ / real'(CLK_HZ) * (n - (TAPS - 1) / 2));
      gain += h[n] * $cos(2.0 * pi * CARRIER_HZ / real'(CLK_HZ) * (n - (TAPS - 1) / 2));
    end
    for (int n = 0; n < TAPS; n++)
      c[n] = sample_t'($rtoi($floor(h[n] / gain * COEF_ONE + 0.5)));
    return c;
  endfunction

  localparam coef_t COEF = make_coef();

  fir_filter #(.TAPS(TAPS), .COEF(COEF)) u_fir (
    .clk, .rst, .en(1'b1), .x, .y
  );
endmodule
