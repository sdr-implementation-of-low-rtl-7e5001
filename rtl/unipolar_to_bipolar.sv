// Unipolar-to-bipolar converter: maps the I and Q bits of a symbol to signed
// levels, 1 -> +AMP and 0 -> -AMP, registered, with the valid strobe delayed
// to match (one clock of latency).  These levels are the constellation points
// at 45, 135, 225 and 315 degrees.  The polarity and amplitude are design
// choices; AMP = 8192 leaves headroom for raised-cosine overshoot and the sum
// of two branches in a 16-bit sample.
module unipolar_to_bipolar
  import sdr_pkg::*;
#(
  parameter int AMP = 8192
) (
  input  logic        clk,
  input  logic        rst,
  input  sym_bits_t   sym,
  input  logic        sym_valid,
  output sym_levels_t lvl,
  output logic        lvl_valid
);
  localparam sample_t POS = sample_t'(AMP);
  localparam sample_t NEG = sample_t'(-AMP);

  always_ff @(posedge clk) begin
    if (rst) begin
      lvl       <= '0;
      lvl_valid <= 1'b0;
    end else begin
      lvl_valid <= sym_valid;
      if (sym_valid) begin
        lvl.i <= sym.i ? POS : NEG;
        lvl.q <= sym.q ? POS : NEG;
      end
    end
  end
endmodule
