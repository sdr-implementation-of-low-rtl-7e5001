// Multiplexer: merges the I and Q decisions back into one serial stream.
//
// out = sel ? q_bit : i_bit, registered.  The down-sampler drives `sel` low
// during the first half of each received symbol and high during the second,
// so the stream carries the even (I) bit and then the odd (Q) bit, the
// inverse of the transmitter's demultiplexer.
module p2s_mux (
  input  logic clk,
  input  logic rst,
  input  logic i_bit,
  input  logic q_bit,
  input  logic sel,
  output logic out
);
  always_ff @(posedge clk) begin
    if (rst) out <= 1'b0;
    else     out <= sel ? q_bit : i_bit;
  end
endmodule
