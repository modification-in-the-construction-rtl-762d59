// sc_multiplier - multiplication in stochastic computing, end to end.
//
// Multiplies two W-bit numbers a and b, read as the probabilities a / 2^W
// and b / 2^W, the stochastic way: two non-binary to stochastic converters
// with independent LFSRs turn them into bit streams, an AND gate multiplies
// the streams, and a counter converts the product stream back into a W-bit
// number over a window of 2^W clock cycles. The result approximates
// a * b / 2^W; its error shrinks with the window length.
// Interface: a start pulse while idle latches a and b and opens the window;
// exactly 2^W cycles later done is high for one cycle and product holds the
// count until the next start. busy is high during the window.
// The chain converter -> AND -> counter follows the source; the window
// length, the handshake and the LFSR polynomials are this design's choice.
module sc_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] product
);
  logic [W-1:0] a_q, b_q;
  logic [W:0]   left;          // cycles left in the window
  logic         sa, sb, sy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      left <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        a_q  <= a;
        b_q  <= b;
        left <= (W+1)'(1) << W;
      end else if (busy) begin
        left <= left - 1'b1;
        if (left == (W+1)'(1)) done <= 1'b1;
      end
    end
  end

  assign busy = (left != '0);

  nb2stoch #(.W(W), .SEED(16'hACE1), .TAPS(16'hB400)) u_cnv_a (
    .clk, .rst_n, .en(1'b1), .x(a_q), .bit_out(sa)
  );

  nb2stoch #(.W(W), .SEED(16'h1D2B), .TAPS(16'hD008)) u_cnv_b (
    .clk, .rst_n, .en(1'b1), .x(b_q), .bit_out(sb)
  );

  stoch_mult u_mul (.a(sa), .b(sb), .y(sy));

  // At most 2^W - 1 ones can be counted since both inputs are below 1.
  stoch2nb #(.W(W)) u_cnt (
    .clk, .rst_n,
    .clear  (!busy && start),
    .en     (busy),
    .bit_in (sy),
    .count  (product)
  );
endmodule
