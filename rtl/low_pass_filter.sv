// Low-pass filter after each receive multiplier.
//
// A LEN-tap moving-average FIR (all coefficients one), computed as a running
// sum: acc += x[n] - x[n-LEN].  Its response is a sinc with nulls at every
// multiple of CLK/LEN; LEN = 25 at 50 MHz places them on the multiples of
// 2 MHz, where the double-carrier product of the mixer lies.  The output is
// sat(acc >>> 4), registered, a gain of LEN/16 at DC.  Delay: one clock for the
// register plus the (LEN-1)/2-sample group delay.  A fixed-delay FIR low-pass
// follows the design's specification; the moving-average form and its
// length are this implementation's choice.
module low_pass_filter
  import sdr_pkg::*;
#(
  parameter int LEN = 25
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t x,
  output sample_t y
);
  sample_t dly [LEN];
  logic signed [31:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < LEN; k++) dly[k] <= '0;
      acc <= '0;
      y   <= '0;
    end else begin
      dly[0] <= x;
      for (int k = 1; k < LEN; k++) dly[k] <= dly[k-1];
      acc <= acc + 32'(x) - 32'(dly[LEN-1]);
      y   <= sat(48'(acc) >>> 4);
    end
  end
endmodule
