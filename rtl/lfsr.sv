// lfsr - random number generator of the stochastic converters.
//
// A Galois linear feedback shift register: when en is high the register
// shifts right by one and, if the bit shifted out was 1, is XORed with the
// feedback mask TAPS. With the default mask (x^16 + x^14 + x^13 + x^11 + 1)
// it walks through all 2^16 - 1 non-zero states. The state is the random
// number, valid in the cycle it is shown; it advances on the next enabled
// clock edge. Reset loads SEED (a zero seed is replaced by 1, since the
// all-zero state would lock up).
// The use of an LFSR follows the source; width, polynomial, seed and the
// Galois form are this design's choice.
module lfsr #(
  parameter int unsigned  WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS = 16'hB400,
  parameter logic [WIDTH-1:0] SEED = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] rnd
);
  localparam logic [WIDTH-1:0] START = (SEED == '0) ? WIDTH'(1) : SEED;

  logic [WIDTH-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= START;
    else if (en)
      state <= (state >> 1) ^ (state[0] ? TAPS : '0);
  end

  assign rnd = state;
endmodule
