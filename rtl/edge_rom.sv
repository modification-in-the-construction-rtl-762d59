// edge_rom - parity check matrix of the code, column by column.
//
// For variable node vn (a column of H) returns its up to DV non-zero entries:
// the check node (row) each connects to and its GF(q) coefficient. The
// matrix is H = [R | I] of size M x N with N = 2M, built at elaboration
// time from nbldpc_pkg::code_edge in the form selected by KIND (lower
// diagonal, LDM, or doubly diagonal, DDM). The table is a constant, so the
// block is a ROM with a combinational read.
// The two matrix structures follow the source; the positions and values
// of the pseudo-random entries are this design's (see nbldpc_pkg).
module edge_rom
  import nbldpc_pkg::*;
#(
  parameter int unsigned N    = 648,
  parameter int unsigned M    = 324,
  parameter int unsigned DV   = 3,
  parameter hkind_e      KIND = H_LDM
) (
  input  logic [$clog2(N)-1:0] vn,
  output edge_t                edges [DV]
);
  typedef edge_t [DV-1:0] col_t;
  typedef col_t  [N-1:0]  tab_t;

  function automatic tab_t build();
    tab_t t;
    for (int n = 0; n < int'(N); n++)
      for (int k = 0; k < int'(DV); k++)
        t[n][k] = code_edge(KIND, n, k, int'(M));
    return t;
  endfunction

  localparam tab_t TAB = build();

  always_comb
    for (int k = 0; k < int'(DV); k++) edges[k] = TAB[vn][k];
endmodule
