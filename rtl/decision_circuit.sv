// Decision circuit: slices a low-pass filtered branch into a bit.
//
// On each clock with `en` high the circuit decides bit = (x >= 0), or
// (x < 0) when INVERT is set, and holds that decision until the next `en`.
// The down-sampler raises `en` once per symbol at the symbol centre, where
// the raised-cosine pulse is at its peak and neighbouring symbols contribute
// nothing, so both the I and the Q bit are decided at the widest eye opening.
// The quadrature branch is inverted because multiplying S(t) by the sine
// carrier yields -Q/2.  Slicing by sign at a zero threshold and deciding once
// per symbol are this implementation's choices.
module decision_circuit
  import sdr_pkg::*;
#(
  parameter bit INVERT = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  sample_t x,
  output logic    bit_out
);
  always_ff @(posedge clk) begin
    if (rst)     bit_out <= 1'b0;
    else if (en) bit_out <= INVERT ? (x < 0) : (x >= 0);
  end
endmodule
