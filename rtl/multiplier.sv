// Multiplier unit: multiplies a sample by a carrier value.
//
// y = sat((a * b) >>> 14), registered (one clock of latency).  With the
// carrier in Q1.14 this keeps the product at the scale of `a`.  Used twice in
// the transmitter (shaped I and Q times cosine and sine) and twice in the
// receiver (received signal times cosine and sine).  The scaling and the
// output register are this implementation's choices.
module multiplier
  import sdr_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t a,
  input  sample_t b,
  output sample_t y
);
  logic signed [47:0] p;

  always_comb p = 48'(a) * 48'(b);

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= sat(p >>> COEF_FRAC);
  end
endmodule
