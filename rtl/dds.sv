// Direct digital synthesizer: the 1 MHz cosine and sine carriers.
//
// A PHASE_W-bit phase accumulator adds the tuning word
// FTW = round(CARRIER_HZ / CLK_HZ * 2**PHASE_W) every clock.  Its top LUT_AW
// bits address a one-period sine table of 2**LUT_AW entries, amplitude
// 2**14 - 1, computed at elaboration; the cosine reads the same table a
// quarter period ahead.  Outputs are registered: both carriers correspond to
// the accumulator value of the previous clock.  The 1 MHz carrier follows the
// design's specification; accumulator and table sizes are this
// implementation's choice.
module dds
  import sdr_pkg::*;
#(
  parameter int CLK_HZ     = sdr_pkg::CLK_HZ_DEF,
  parameter int CARRIER_HZ = sdr_pkg::CARRIER_HZ_DEF,
  parameter int PHASE_W    = 32,
  parameter int LUT_AW     = 10
) (
  input  logic    clk,
  input  logic    rst,
  output sample_t cos_out,
  output sample_t sin_out,
  output logic [PHASE_W-1:0] phase
);
  localparam int LUT_N = 1 << LUT_AW;
  localparam logic [PHASE_W-1:0] FTW =
    PHASE_W'(longint'($floor(real'(CARRIER_HZ) / real'(CLK_HZ) * (2.0 ** PHASE_W) + 0.5)));
  localparam logic [LUT_AW-1:0] QUARTER = LUT_AW'(LUT_N / 4);

  typedef sample_t lut_t [LUT_N];

  function automatic lut_t make_lut();
    lut_t t;
    for (int n = 0; n < LUT_N; n++)
      t[n] = sample_t'($rtoi($floor($sin(2.0 * 3.14159265358979 * n / LUT_N)
                                    * (COEF_ONE - 1) + 0.5)));
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [LUT_AW-1:0] addr;

  always_comb addr = phase[PHASE_W-1 -: LUT_AW];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= '0;
      cos_out <= '0;
      sin_out <= '0;
    end else begin
      phase   <= phase + FTW;
      sin_out <= LUT[addr];
      cos_out <= LUT[addr + QUARTER];
    end
  end
endmodule
