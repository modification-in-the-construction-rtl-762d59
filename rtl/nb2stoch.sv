// nb2stoch - non-binary to stochastic number converter.
//
// Turns a W-bit number x (read as the probability x / 2^W) into a stream of
// bits whose fraction of ones is x / 2^W. Every clock an LFSR produces a new
// random number y; the comparator outputs 1 when x > y and 0 otherwise.
// The output is combinational from x and the current random number; the
// random number advances on every clock edge while en is high.
// Structure (random number generator + comparator, output 1 when the input
// is greater) follows the source; the LFSR and its width are this design's
// choice: the low W bits of a 16-bit LFSR form y.
module nb2stoch #(
  parameter int unsigned W    = 8,
  parameter logic [15:0] SEED = 16'hACE1,
  parameter logic [15:0] TAPS = 16'hB400
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic         bit_out
);
  logic [15:0] rnd;

  lfsr #(.WIDTH(16), .TAPS(TAPS), .SEED(SEED)) u_rng (
    .clk, .rst_n, .en, .rnd
  );

  // Comparator: X (number) against Y (random number).
  assign bit_out = (x > rnd[W-1:0]);
endmodule
