// Rate generator: divides the sample clock into the transceiver's clock enables.
//
// A symbol counter runs from 0 to SPS-1, where SPS = 2*CLK_HZ/BIT_HZ is the
// number of sample clocks in one QPSK symbol (two bits).  From it come
//   bit_en  - one-cycle pulse at the start of every bit (50 kb/s),
//   sym_en  - one-cycle pulse at the start of every symbol (25 kbaud),
//   os_en   - OS pulses per symbol, the sample rate of the pulse shaper,
// All pulses are registered, so they appear one cycle after the counter value
// they decode.  The bit and symbol rates follow the design's specification;
// using one clock with enables rather than divided clocks is a design choice.
module rate_gen #(
  parameter int CLK_HZ = sdr_pkg::CLK_HZ_DEF,
  parameter int BIT_HZ = sdr_pkg::BIT_HZ_DEF,
  parameter int OS     = sdr_pkg::OS_DEF
) (
  input  logic clk,
  input  logic rst,
  output logic bit_en,
  output logic sym_en,
  output logic os_en
);
  localparam int SPS    = 2 * CLK_HZ / BIT_HZ;   // samples per symbol
  localparam int SPB    = SPS / 2;               // samples per bit
  localparam int OS_DIV = SPS / OS;              // samples per shaper sample
  localparam int CW     = $clog2(SPS);

  initial begin
    assert (SPS % OS == 0) else $error("OS must divide the samples per symbol");
  end

  logic [CW-1:0] cnt;
  logic [CW-1:0] os_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      os_cnt <= '0;
      bit_en <= 1'b0;
      sym_en <= 1'b0;
      os_en  <= 1'b0;
    end else begin
      cnt    <= (cnt == CW'(SPS - 1)) ? '0 : cnt + 1'b1;
      os_cnt <= (os_cnt == CW'(OS_DIV - 1) || cnt == CW'(SPS - 1)) ? '0 : os_cnt + 1'b1;
      bit_en <= (cnt == '0) || (cnt == CW'(SPB));
      sym_en <= (cnt == '0);
      os_en  <= (os_cnt == '0);
    end
  end
endmodule
