// QPSK transmitter unit.
//
// Random data generator -> demultiplexer (even bit to I, odd bit to Q) ->
// unipolar-to-bipolar converters -> raised-cosine pulse shapers -> multiplied
// by the DDS cosine (I) and sine (Q) -> summer, S = I*cos - Q*sin.  The rate
// enables come from the shared rate generator; the DDS carriers are brought out
// because the receiver demodulates with the same carriers.  Structure and
// signal flow follow the design's block diagram; latencies are those of the
// sub-blocks (see their headers).
module qpsk_transmitter
  import sdr_pkg::*;
#(
  parameter int CLK_HZ     = sdr_pkg::CLK_HZ_DEF,
  parameter int CARRIER_HZ = sdr_pkg::CARRIER_HZ_DEF,
  parameter int OS         = sdr_pkg::OS_DEF
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    bit_en,
  input  logic    os_en,
  output logic    data,        // transmitted serial bit
  output logic    data_valid,  // pulse when `data` changes to a new bit
  output logic    even_bit,    // I bit of the current symbol
  output logic    odd_bit,     // Q bit of the current symbol
  output logic    sym_valid,   // pulse when a new symbol is formed
  output sample_t i_shaped,
  output sample_t q_shaped,
  output sample_t cos_carrier,
  output sample_t sin_carrier,
  output sample_t i_mod,
  output sample_t q_mod,
  output sample_t tx_out
);
  sym_bits_t   sym;
  sym_levels_t lvl;
  logic        lvl_valid;
  logic [31:0] phase;

  random_data_gen u_gen (.clk, .rst, .bit_en, .data, .data_valid);

  demux_s2p u_demux (.clk, .rst, .data, .data_valid, .sym, .sym_valid, .even_bit, .odd_bit);

  unipolar_to_bipolar u_u2b (.clk, .rst, .sym, .sym_valid, .lvl, .lvl_valid);

  pulse_shaping_filter #(.OS(OS)) u_shape_i (
    .clk, .rst, .lvl(lvl.i), .lvl_valid, .os_en, .y(i_shaped));
  pulse_shaping_filter #(.OS(OS)) u_shape_q (
    .clk, .rst, .lvl(lvl.q), .lvl_valid, .os_en, .y(q_shaped));

  dds #(.CLK_HZ(CLK_HZ), .CARRIER_HZ(CARRIER_HZ)) u_dds (
    .clk, .rst, .cos_out(cos_carrier), .sin_out(sin_carrier), .phase);

  multiplier u_mul_i (.clk, .rst, .a(i_shaped), .b(cos_carrier), .y(i_mod));
  multiplier u_mul_q (.clk, .rst, .a(q_shaped), .b(sin_carrier), .y(q_mod));

  iq_sum u_sum (.clk, .rst, .i_mod, .q_mod, .y(tx_out));

  logic unused_phase;
  assign unused_phase = ^phase;
endmodule
