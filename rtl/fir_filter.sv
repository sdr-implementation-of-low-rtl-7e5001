// Direct-form FIR filter with a clock enable, shared by the pulse shaper and
// the receive band-pass filter.
//
// On every cycle with `en` high the input sample enters a TAPS-deep delay
// line and the output register takes sum(COEF[k] * x[n-k]) >>> COEF_FRAC,
// saturated to a sample.  The output therefore appears one enabled sample
// after its input and holds between enables; the filter's own group delay
// (TAPS-1)/2 samples comes on top for a symmetric coefficient set.
// Coefficients are Q1.14 parameters supplied by the instantiating module;
// the default is a 3-tap [1/4 1/2 1/4] smoother.
module fir_filter
  import sdr_pkg::*;
#(
  parameter int      TAPS = 3,
  parameter sample_t COEF [TAPS] = '{16'sd4096, 16'sd8192, 16'sd4096}
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  sample_t x,
  output sample_t y
);
  sample_t dly [TAPS];
  logic signed [47:0] acc;

  always_comb begin
    acc = 48'sd0;
    acc += 48'(x) * 48'(COEF[0]);
    for (int k = 1; k < TAPS; k++) acc += 48'(dly[k-1]) * 48'(COEF[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) dly[k] <= '0;
      y <= '0;
    end else if (en) begin
      dly[0] <= x;
      for (int k = 1; k < TAPS; k++) dly[k] <= dly[k-1];
      y <= sat(acc >>> COEF_FRAC);
    end
  end
endmodule
