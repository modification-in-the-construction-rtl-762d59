// stoch_mult - stochastic multiplier.
//
// Two independent stochastic bit streams whose ones-densities are pa and pb
// are ANDed; the result has ones-density pa * pb. Purely combinational,
// one output bit per input bit pair. Follows the source (a single AND gate).
module stoch_mult (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a & b;
endmodule
