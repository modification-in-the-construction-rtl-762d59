// vnu - SPA variable node unit (one output message).
//
// Computes q_a = alpha * f_a * prod_i V_i(a) for every GF symbol a, where f
// is the channel PMF, V_i are the incoming check-to-variable PMFs and alpha
// normalises the result to sum to one. The datapath has the four stages of
// the classic VNU: a multiplier forms the unnormalised products, an adder
// sums them over a, a reciprocal unit forms 2^K / sum and a second
// multiplier scales every product by the reciprocal. Inputs and outputs are
// W-bit probabilities in units of 2^-W (an output of 1.0 saturates to
// 2^W - 1). An input whose bit in msg_en is low counts as the constant 1
// (an edge that does not exist). If every product is zero the output is the
// uniform PMF. Purely combinational.
// The stages and the 6-bit message width follow the source; the reciprocal
// precision K and the full-width products are this design's choice.
module vnu #(
  parameter int unsigned Q   = 4,
  parameter int unsigned W   = 6,
  parameter int unsigned NIN = 2
) (
  input  logic [W-1:0]   prior   [Q],
  input  logic [W-1:0]   msg     [NIN][Q],
  input  logic [NIN-1:0] msg_en,
  output logic [W-1:0]   pmf_out [Q]
);
  localparam int unsigned PW = W * (NIN + 1);         // product width
  localparam int unsigned SW = PW + $clog2(Q);        // sum width
  localparam int unsigned K  = SW + W + 8;            // reciprocal scale
  localparam int unsigned OW = PW + K + 1;            // scaled product width

  logic [PW-1:0] prod [Q];
  logic [SW-1:0] sum;
  logic [K:0]    recip;

  // multiplier
  always_comb begin
    for (int a = 0; a < Q; a++) begin
      prod[a] = PW'(prior[a]);
      for (int i = 0; i < NIN; i++)
        prod[a] = prod[a] * (msg_en[i] ? PW'(msg[i][a]) : PW'({W{1'b1}}));
    end
  end

  // adder
  always_comb begin
    sum = '0;
    for (int a = 0; a < Q; a++) sum = sum + SW'(prod[a]);
  end

  // reciprocal
  always_comb begin
    if (sum == '0) recip = '0;
    else           recip = ((K+1)'(1) << K) / (K+1)'(sum);
  end

  // multiplier by the reciprocal, rescaled to W bits
  always_comb begin
    for (int a = 0; a < Q; a++) begin
      logic [OW-1:0] s;
      s = (OW'(prod[a]) * OW'(recip)) >> (K - W);
      if (sum == '0)
        pmf_out[a] = W'((1 << W) / Q);
      else if (s >= OW'({W{1'b1}}))
        pmf_out[a] = '1;
      else
        pmf_out[a] = s[W-1:0];
    end
  end
endmodule
