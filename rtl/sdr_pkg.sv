// Shared types and constants of the QPSK transceiver.
//
// Every datapath signal is a 16-bit two's-complement sample (sample_t).
// Carrier and filter coefficients use Q1.14 scaling (1.0 == 2**14), so a
// product of a sample and a coefficient is brought back to sample scale by an
// arithmetic shift right of 14.  The bit rate (50 kb/s) and the carrier
// (1 MHz) are the values the design is specified for; the 50 MHz sample
// clock, the 8-times oversampled pulse shaper and the 16-bit width are this
// implementation's choices.
package sdr_pkg;

  localparam int SAMPLE_W   = 16;
  localparam int COEF_FRAC  = 14;                // Q1.14 coefficients
  localparam int COEF_ONE   = 1 << COEF_FRAC;

  localparam int CLK_HZ_DEF     = 50_000_000;        // sample clock (design choice)
  localparam int BIT_HZ_DEF     = 50_000;            // serial data rate
  localparam int CARRIER_HZ_DEF = 1_000_000;         // carrier frequency
  localparam int OS_DEF         = 8;                 // pulse-shaper samples per symbol

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // I/Q pair of one QPSK symbol, as bits and as bipolar levels
  typedef struct packed {
    logic i;
    logic q;
  } sym_bits_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } sym_levels_t;

  // Saturate a wide signed value to the sample range
  function automatic sample_t sat(input logic signed [47:0] v);
    localparam logic signed [47:0] MAXV = 48'sd32767;
    localparam logic signed [47:0] MINV = -48'sd32768;
    if (v > MAXV)      return sample_t'(16'sh7fff);
    else if (v < MINV) return sample_t'(16'sh8000);
    else               return sample_t'(v[SAMPLE_W-1:0]);
  endfunction

endpackage
