// nbldpc_top - top level: the non-binary stochastic LDPC decoder next to a
// stochastic multiplier.
//
// dec_*: the relaxed half-stochastic decoder for the (648, 324) code over
// GF(4) with the lower diagonal parity check matrix (see rhs_decoder):
// channel PMFs in, decoded GF(4) symbols out, both in variable-node order.
// mul_*: the stochastic computing multiplier (see sc_multiplier), which
// shows the converter -> bitwise operation -> counter chain on plain
// binary streams. The two share only clock and reset.
module nbldpc_top
  import nbldpc_pkg::*;
#(
  parameter int unsigned N          = 648,
  parameter int unsigned M          = 324,
  parameter int unsigned DV         = 3,
  parameter hkind_e      KIND       = H_LDM,
  parameter int unsigned MAX_ITER   = 32,
  parameter int unsigned DEC_ITERS  = 8,
  parameter int unsigned BETA_SHIFT = 3,
  parameter int unsigned MUL_W      = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // decoder
  input  logic                 dec_in_valid,
  output logic                 dec_in_ready,
  input  prob_t                dec_in_pmf [GF_Q],
  output logic                 dec_out_valid,
  input  logic                 dec_out_ready,
  output gf_t                  dec_out_sym,
  output logic [$clog2(N)-1:0] dec_out_idx,
  output logic                 dec_out_last,
  output logic                 dec_busy,
  // stochastic multiplier
  input  logic                 mul_start,
  input  logic [MUL_W-1:0]     mul_a,
  input  logic [MUL_W-1:0]     mul_b,
  output logic                 mul_busy,
  output logic                 mul_done,
  output logic [MUL_W-1:0]     mul_product
);
  rhs_decoder #(
    .N(N), .M(M), .DV(DV), .KIND(KIND), .MAX_ITER(MAX_ITER),
    .DEC_ITERS(DEC_ITERS), .BETA_SHIFT(BETA_SHIFT)
  ) u_dec (
    .clk, .rst_n,
    .in_valid  (dec_in_valid),
    .in_ready  (dec_in_ready),
    .in_pmf    (dec_in_pmf),
    .out_valid (dec_out_valid),
    .out_ready (dec_out_ready),
    .out_sym   (dec_out_sym),
    .out_idx   (dec_out_idx),
    .out_last  (dec_out_last),
    .busy      (dec_busy)
  );

  sc_multiplier #(.W(MUL_W)) u_mul (
    .clk, .rst_n,
    .start   (mul_start),
    .a       (mul_a),
    .b       (mul_b),
    .busy    (mul_busy),
    .done    (mul_done),
    .product (mul_product)
  );
endmodule
