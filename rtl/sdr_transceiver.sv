// Low-frequency QPSK software-defined-radio transceiver (top level).
//
// A 50 kb/s pseudo-random bit stream is split into I/Q symbol pairs at
// 25 kbaud, shaped by raised-cosine filters and modulated onto a 1 MHz
// carrier from a DDS (S = I*cos - Q*sin).  The modulated samples are brought
// out (mod_out, for a DAC) and looped straight into the receiver, which
// band-pass filters them, mixes them down with the same DDS carriers, low-pass
// filters, slices, re-serialises and down-samples to recover the bit stream.
// rx_data reproduces tx_data with a fixed delay of ALIGN + SPS/4 clocks from
// tx_data_valid to rx_data_valid (5816 clocks, about 5.8 bit periods, at the
// defaults).  The first five rx_data_valid pulses after reset carry no data:
// they fall before the first symbol has crossed the link.
// One 50 MHz clock runs everything; the rate generator provides the bit,
// symbol and shaper-sample enables.  Block structure, rates and carrier follow
// the design's specification; the clock, widths, filter shapes and receiver
// timing alignment are this implementation's choices.
module sdr_transceiver
  import sdr_pkg::*;
#(
  parameter int CLK_HZ     = sdr_pkg::CLK_HZ_DEF,
  parameter int BIT_HZ     = sdr_pkg::BIT_HZ_DEF,
  parameter int CARRIER_HZ = sdr_pkg::CARRIER_HZ_DEF,
  parameter int OS         = sdr_pkg::OS_DEF
) (
  input  logic    clk,
  input  logic    rst,
  output logic    tx_data,
  output logic    tx_data_valid,
  output logic    i_bit,
  output logic    q_bit,
  output sample_t cos_carrier,
  output sample_t sin_carrier,
  output logic    tx_sym_valid,
  output sample_t i_shaped,
  output sample_t q_shaped,
  output sample_t i_mod,
  output sample_t q_mod,
  output sample_t mod_out,
  output sample_t rx_bpf,
  output sample_t rx_i_mix,
  output sample_t rx_q_mix,
  output sample_t rx_i_lpf,
  output sample_t rx_q_lpf,
  output logic    rx_i_dec,
  output logic    rx_q_dec,
  output logic    rx_data,
  output logic    rx_data_valid
);
  localparam int SPS = 2 * CLK_HZ / BIT_HZ;
  localparam int SPAN = 4;     // pulse-shaper span in symbols (its default)
  // Clocks from a transmit symbol strobe to the centre of that symbol at the
  // low-pass filter outputs.  The symbol's level enters the shaper at the
  // first shaper sample after its second bit, SPS/2 + SPS/OS; the pulse peak
  // leaves the shaper SPS*SPAN/2 + 1 clocks later; then come the transmit
  // multiplier (1), summer (1), band-pass filter (1 + 47), receive
  // multiplier (1) and low-pass filter (1 + 1 + 12).
  localparam int DATAPATH = 1 + 1 + 48 + 1 + 14;
  localparam int ALIGN = SPS / 2 + SPS / OS + SPS * SPAN / 2 + 1 + DATAPATH;

  logic    bit_en, sym_en, os_en;

  rate_gen #(.CLK_HZ(CLK_HZ), .BIT_HZ(BIT_HZ), .OS(OS)) u_rate (
    .clk, .rst, .bit_en, .sym_en, .os_en);

  qpsk_transmitter #(.CLK_HZ(CLK_HZ), .CARRIER_HZ(CARRIER_HZ), .OS(OS)) u_tx (
    .clk, .rst, .bit_en, .os_en,
    .data(tx_data), .data_valid(tx_data_valid),
    .even_bit(i_bit), .odd_bit(q_bit), .sym_valid(tx_sym_valid),
    .i_shaped, .q_shaped, .cos_carrier, .sin_carrier, .i_mod, .q_mod,
    .tx_out(mod_out));

  qpsk_receiver #(.CLK_HZ(CLK_HZ), .BIT_HZ(BIT_HZ), .CARRIER_HZ(CARRIER_HZ), .ALIGN(ALIGN)) u_rx (
    .clk, .rst, .rx_in(mod_out), .cos_carrier, .sin_carrier, .sym_en,
    .bpf_out(rx_bpf), .i_mix(rx_i_mix), .q_mix(rx_q_mix), .i_lpf(rx_i_lpf), .q_lpf(rx_q_lpf),
    .i_dec(rx_i_dec), .q_dec(rx_q_dec), .data(rx_data), .data_valid(rx_data_valid));
endmodule
