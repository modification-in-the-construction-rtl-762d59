// relax_update - stochastic-to-SPA message conversion.
//
// Keeps a check-to-variable PMF up to date from the single GF(q) symbol the
// stochastic check node sends each iteration, by successive relaxation:
//   V'(a) = V(a) - V(a) * beta + beta * [a == sym]
// with beta = 2^-BETA_SHIFT. Probabilities are W-bit numbers in units of
// 2^-W; V(a) * beta is rounded down, so a probability that keeps losing
// settles at 2^BETA_SHIFT - 1 and never reaches zero (a symbol the checks
// have voted against can still recover); the term
// beta * [a == sym] is 2^(W-BETA_SHIFT) and a result that would reach 2^W
// saturates at 2^W - 1. When en is low the PMF passes
// unchanged. Combinational.
// Successive relaxation and a PMF store initialised to the equiprobable
// distribution follow the source; the value of beta and the fixed-point
// form are this design's choice.
module relax_update #(
  parameter int unsigned Q          = 4,
  parameter int unsigned W          = 6,
  parameter int unsigned BETA_SHIFT = 3
) (
  input  logic                 en,
  input  logic [$clog2(Q)-1:0] sym,
  input  logic [W-1:0]         pmf_in  [Q],
  output logic [W-1:0]         pmf_out [Q]
);
  localparam logic [W:0] STEP = (W+1)'(1) << (W - BETA_SHIFT);

  always_comb begin
    for (int a = 0; a < Q; a++) begin
      logic [W:0] v;
      v = {1'b0, pmf_in[a]} - {1'b0, (pmf_in[a] >> BETA_SHIFT)};
      if (a == int'(sym)) v = v + STEP;
      if (!en)
        pmf_out[a] = pmf_in[a];
      else if (v[W])
        pmf_out[a] = '1;
      else
        pmf_out[a] = v[W-1:0];
    end
  end
endmodule
