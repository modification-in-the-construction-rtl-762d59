// perm_node - permutation node between a variable node and a check node.
//
// A check equation reads sum_j h_j * c_j = 0 over GF(q). Towards the check
// node (to_var = 0) the node multiplies the variable's symbol by the edge
// coefficient h, so the check node only has to add; towards the variable
// node (to_var = 1) it divides the check's symbol by h. Working on sampled
// symbols rather than on whole PMFs gives the same result as permuting the
// PMF entries and then sampling. Combinational.
// The permutation node sits between variable and check node as in the
// source; its realisation as a GF multiplier on symbols is this design's.
module perm_node
  import nbldpc_pkg::*;
(
  input  gf_t  sym_in,
  input  gf_t  h,
  input  logic to_var,
  output gf_t  sym_out
);
  assign sym_out = to_var ? gf_mul(sym_in, gf_inv(h)) : gf_mul(sym_in, h);
endmodule
