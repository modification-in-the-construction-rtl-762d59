// pmf_sampler - SPA-to-stochastic message conversion.
//
// Draws one GF(q) symbol distributed according to a PMF. The PMF entries
// are summed into cumulative thresholds c_a = p_0 + ... + p_a; a 16-bit
// random number from an LFSR is scaled into [0, c_{q-1}) and compared with
// every threshold (comparator output 1 when the threshold is greater, as in
// the non-binary to stochastic converter). The symbol is the first a whose
// threshold exceeds the random number, i.e. the number of comparators that
// output 0. A PMF that sums to zero is sampled as uniform. The symbol is
// combinational from the current random number; the LFSR moves on at each
// clock edge with en high, so one symbol is drawn per enabled cycle.
// Drawing one symbol per message from the PMF follows the source; the
// inverse-CDF comparator bank is this design's choice.
module pmf_sampler #(
  parameter int unsigned Q    = 4,
  parameter int unsigned W    = 6,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [W-1:0]         pmf [Q],
  output logic [$clog2(Q)-1:0] sym
);
  localparam int unsigned CW = W + $clog2(Q);

  logic [15:0]   rnd;
  logic [CW-1:0] cum [Q];
  logic [CW-1:0] r;
  logic [Q-1:0]  gt;

  lfsr #(.WIDTH(16), .TAPS(16'hB400), .SEED(SEED)) u_rng (
    .clk, .rst_n, .en, .rnd
  );

  always_comb begin
    cum[0] = CW'(pmf[0]);
    for (int a = 1; a < Q; a++) cum[a] = cum[a-1] + CW'(pmf[a]);
  end

  // random number scaled to [0, total)
  always_comb begin
    r = CW'(((CW+16)'(rnd) * (CW+16)'(cum[Q-1])) >> 16);
  end

  always_comb begin
    int zeros;
    for (int a = 0; a < Q; a++) gt[a] = (cum[a] > r);
    zeros = 0;
    for (int a = 0; a < Q; a++) if (!gt[a]) zeros++;
    if (cum[Q-1] == '0)
      sym = rnd[$clog2(Q)-1:0];
    else
      sym = ($clog2(Q))'(zeros);
  end
endmodule
