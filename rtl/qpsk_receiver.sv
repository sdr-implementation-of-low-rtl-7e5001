// QPSK receiver unit (coherent).
//
// Band-pass filter -> multiplied by the cosine (I branch) and sine (Q branch)
// carriers -> moving-average low-pass filters -> decision circuits (the Q
// slice inverted, since S*sin = -Q/2 + 2fc terms) -> multiplexer -> down-
// sampler.  The down-sampler's phase counter tells the decision circuits
// when the symbol centre is at the low-pass outputs.  The carriers are the
// transmitter's DDS outputs, as in the design's block diagram, which has no
// separate carrier recovery.  The
// down-sampler's bit timing is the transmitter's symbol strobe delayed by
// ALIGN clocks, the fixed latency from a transmit symbol strobe to the centre
// of that symbol at the low-pass filter outputs.
module qpsk_receiver
  import sdr_pkg::*;
#(
  parameter int CLK_HZ = sdr_pkg::CLK_HZ_DEF,
  parameter int BIT_HZ = sdr_pkg::BIT_HZ_DEF,
  parameter int CARRIER_HZ = sdr_pkg::CARRIER_HZ_DEF,
  parameter int ALIGN  = 5316
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t rx_in,
  input  sample_t cos_carrier,
  input  sample_t sin_carrier,
  input  logic    sym_en,      // transmitter symbol strobe (timing reference)
  output sample_t bpf_out,
  output sample_t i_mix,
  output sample_t q_mix,
  output sample_t i_lpf,
  output sample_t q_lpf,
  output logic    i_dec,
  output logic    q_dec,
  output logic    data,
  output logic    data_valid
);
  logic sel;
  logic mux_out;
  logic dec_en;

  band_pass_filter #(.CLK_HZ(CLK_HZ), .CARRIER_HZ(CARRIER_HZ)) u_bpf (
    .clk, .rst, .x(rx_in), .y(bpf_out));

  multiplier u_mul_i (.clk, .rst, .a(bpf_out), .b(cos_carrier), .y(i_mix));
  multiplier u_mul_q (.clk, .rst, .a(bpf_out), .b(sin_carrier), .y(q_mix));

  low_pass_filter u_lpf_i (.clk, .rst, .x(i_mix), .y(i_lpf));
  low_pass_filter u_lpf_q (.clk, .rst, .x(q_mix), .y(q_lpf));

  decision_circuit #(.INVERT(1'b0)) u_dec_i (.clk, .rst, .en(dec_en), .x(i_lpf), .bit_out(i_dec));
  decision_circuit #(.INVERT(1'b1)) u_dec_q (.clk, .rst, .en(dec_en), .x(q_lpf), .bit_out(q_dec));

  p2s_mux u_mux (.clk, .rst, .i_bit(i_dec), .q_bit(q_dec), .sel, .out(mux_out));

  down_sampler #(.SPS(2 * CLK_HZ / BIT_HZ), .ALIGN(ALIGN)) u_ds (
    .clk, .rst, .sym_en, .mux_out, .dec_en, .sel, .data, .data_valid);
endmodule
