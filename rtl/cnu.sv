// cnu - stochastic check node unit over GF(2^P).
//
// In GF(2^P) the sum of symbols is their bitwise XOR, so a check node that
// exchanges single GF(q) symbols (stochastic messages) needs only XOR gates
// and a register. During an iteration every incoming symbol (in_valid,
// in_sym) is XORed into the accumulator acc. On iter_end the accumulator is
// copied into the register total (the XOR of all the check's inputs of the
// finished iteration) and cleared for the next iteration. The message a
// check sends back on one edge is total XOR that edge's own last input,
// which removes the edge's own contribution; that XOR is formed where the
// edge's last input is stored (in the decoder). clear empties both
// registers at the start of a frame.
// XOR plus flip-flop follows the source; accumulating the inputs serially
// and the iteration strobe are this design's choice.
module cnu #(
  parameter int unsigned P = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         iter_end,
  input  logic         in_valid,
  input  logic [P-1:0] in_sym,
  output logic [P-1:0] total
);
  logic [P-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      total <= '0;
    end else if (clear) begin
      acc   <= '0;
      total <= '0;
    end else if (iter_end) begin
      total <= acc;
      acc   <= '0;
    end else if (in_valid) begin
      acc   <= acc ^ in_sym;
    end
  end

  // An input arriving together with the iteration strobe would be lost.
  a_no_input_at_end: assert property (@(posedge clk) disable iff (!rst_n)
    !(iter_end && in_valid));
endmodule
