// Demultiplexer: serial-to-parallel converter that pairs bits into QPSK symbols.
//
// Bits arrive on `data` with a one-cycle `data_valid` strobe.  The first bit
// of each pair (the even bit) is held; when the second (odd) bit arrives the
// pair is presented on `sym` as {i = even, q = odd} with a one-cycle
// `sym_valid`, one clock after the odd bit's strobe.  `sym` holds between symbols.
// Pairing even bits to I and odd bits to Q is this design's reading of the
// specification's even/odd naming.
module demux_s2p
  import sdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      data,
  input  logic      data_valid,
  output sym_bits_t sym,
  output logic      sym_valid,
  output logic      even_bit,
  output logic      odd_bit
);
  logic have_even;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_even <= 1'b0;
      even_bit  <= 1'b0;
      odd_bit   <= 1'b0;
      sym       <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (data_valid) begin
        if (!have_even) begin
          even_bit  <= data;
          have_even <= 1'b1;
        end else begin
          odd_bit   <= data;
          sym       <= '{i: even_bit, q: data};
          sym_valid <= 1'b1;
          have_even <= 1'b0;
        end
      end
    end
  end
endmodule
