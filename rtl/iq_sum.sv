// Summer: forms the QPSK signal from the two modulated branches.
//
// y = sat(i_mod - q_mod), registered, which with i_mod = I*cos and
// q_mod = Q*sin gives S(t) = I(t)cos(2*pi*fc*t) - Q(t)sin(2*pi*fc*t), the
// QPSK equation of the design.  Saturation to 16 bits is this
// implementation's choice; with the default levels it never engages.
module iq_sum
  import sdr_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t i_mod,
  input  sample_t q_mod,
  output sample_t y
);
  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= sat(48'(i_mod) - 48'(q_mod));
  end
endmodule
