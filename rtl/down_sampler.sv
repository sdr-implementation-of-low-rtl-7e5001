// Down-sampler: symbol timing of the receiver and one sample per output bit.
//
// A phase counter ph runs over the SPS sample clocks of a symbol.  It is
// aligned by the transmitter's symbol strobe so that, counting from the cycle
// of sym_en as t = 0, ph(t) = (t - ALIGN) mod SPS: ALIGN is the number of
// clocks from a transmit symbol strobe to the centre of that symbol at the
// low-pass filter outputs.  At ph = 0 the module raises dec_en, so the
// decision circuits decide on the symbol centre.  `sel` is low for the first
// half of the symbol that follows (the multiplexer passes the I decision) and
// high for the second half (Q).  The registered multiplexer output is
// captured at ph = SPS/4 and ph = 3*SPS/4, giving `data` with a one-cycle
// `data_valid` at 50 kb/s, I bit first.  Nothing is output before the first
// sym_en.  Deriving the sampling phase from the transmitter's symbol timing
// with a fixed delay is this implementation's choice; no timing recovery is
// done.
module down_sampler #(
  parameter int SPS   = 2 * sdr_pkg::CLK_HZ_DEF / sdr_pkg::BIT_HZ_DEF,
  parameter int ALIGN = 0
) (
  input  logic clk,
  input  logic rst,
  input  logic sym_en,
  input  logic mux_out,
  output logic dec_en,
  output logic sel,
  output logic data,
  output logic data_valid
);
  localparam int CW   = $clog2(SPS);
  localparam int LOAD = ((1 - ALIGN) % SPS + SPS) % SPS;

  logic [CW-1:0] ph;
  logic          locked;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph         <= '0;
      locked     <= 1'b0;
      data       <= 1'b0;
      data_valid <= 1'b0;
    end else begin
      if (sym_en) begin
        ph     <= CW'(LOAD);
        locked <= 1'b1;
      end else begin
        ph <= (ph == CW'(SPS - 1)) ? '0 : ph + 1'b1;
      end
      data_valid <= 1'b0;
      if (locked && (ph == CW'(SPS / 4) || ph == CW'(3 * SPS / 4))) begin
        data       <= mux_out;
        data_valid <= 1'b1;
      end
    end
  end

  always_comb begin
    dec_en = locked && (ph == '0);
    sel    = (ph >= CW'(SPS / 2));
  end
endmodule
