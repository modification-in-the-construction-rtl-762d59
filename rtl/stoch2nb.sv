// stoch2nb - stochastic to non-binary number converter.
//
// A counter that counts the ones of a stochastic bit stream while en is
// high; after 2^W enabled cycles the count is the W-bit number the stream
// carries. clear resets the count (clear wins over en). The count saturates
// at its maximum rather than wrapping. Counting follows the source; the
// clear input, the saturation and the width are this design's choice.
module stoch2nb #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         bit_in,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (clear)
      count <= '0;
    else if (en && bit_in && count != '1)
      count <= count + 1'b1;
  end
endmodule
