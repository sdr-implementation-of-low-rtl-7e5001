// Random data generator: the transmitter's pseudo-random serial bit source.
//
// A 32-bit Fibonacci linear-feedback shift register with the maximal-length
// polynomial x^32 + x^22 + x^2 + x + 1 advances once per bit_en pulse.  The
// register's top bit is the transmitted bit; data_valid pulses in the cycle
// after bit_en, when a new bit is on `data`.  The 32-bit random source and its
// 50 kb/s rate (set by bit_en) follow the specification; the polynomial and
// the non-zero reset seed are design choices.
module random_data_gen #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic clk,
  input  logic rst,
  input  logic bit_en,
  output logic data,
  output logic data_valid
);
  logic [31:0] lfsr;
  logic        fb;

  initial assert (SEED != '0) else $error("LFSR seed must be non-zero");

  always_comb fb = lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr       <= SEED;
      data_valid <= 1'b0;
    end else begin
      data_valid <= bit_en;
      if (bit_en) lfsr <= {lfsr[30:0], fb};
    end
  end

  assign data = lfsr[31];
endmodule
