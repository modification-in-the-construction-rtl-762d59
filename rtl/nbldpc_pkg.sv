// nbldpc_pkg - shared types, constants and functions of the non-binary
// stochastic LDPC decoder.
//
// Holds the Galois-field size (GF(4), two bits per symbol), the width of a
// probability (6 bits, as on the VNU data paths), GF(2^p) multiply and
// inverse, and the construction of the two structured parity check
// matrices H = [R | I]:
//   LDM: R has ones on the diagonal of its lower half (rows M/2..M-1) and
//        pseudo-random entries elsewhere,
//   DDM: R has ones on the diagonal and on the sub-diagonal, plus one
//        pseudo-random entry per column.
// The right half I is an M x M identity. The diagonal and identity entries
// are the GF element 1. Where the random entries of R sit and which GF
// values they take is not fixed by the source; here they follow a fixed
// formula (row = (j*37+11) mod M and (j*101+53) mod M, value
// 1 + (7j+5k) mod (q-1)) so that the matrix can be rebuilt anywhere
// without a stored table.
package nbldpc_pkg;

  // GF(2^GF_P) with primitive polynomial x^2 + x + 1.
  localparam int unsigned GF_P    = 2;
  localparam int unsigned GF_Q    = 1 << GF_P;
  localparam logic [GF_P:0] GF_POLY = 3'b111;

  // Probability width (units of 1/64).
  localparam int unsigned PROB_W  = 6;

  // Widest row index a code may use.
  localparam int unsigned ROW_W   = 10;

  typedef logic [GF_P-1:0]   gf_t;
  typedef logic [PROB_W-1:0] prob_t;

  typedef enum logic [0:0] {
    H_LDM = 1'b0,   // lower diagonal based matrix
    H_DDM = 1'b1    // doubly diagonal based matrix
  } hkind_e;

  // One non-zero entry of a column of H.
  typedef struct packed {
    logic             vld;  // entry exists
    logic [ROW_W-1:0] row;  // check node index
    gf_t              h;    // GF(q) coefficient, never 0 when vld
  } edge_t;

  // Carry-less multiply followed by reduction modulo GF_POLY.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [2*GF_P-2:0] t;
    t = '0;
    for (int i = 0; i < GF_P; i++)
      if (b[i]) t = t ^ ((2*GF_P-1)'(a) << i);
    for (int i = 2*GF_P-2; i >= GF_P; i--)
      if (t[i]) t = t ^ ((2*GF_P-1)'(GF_POLY) << (i - GF_P));
    return t[GF_P-1:0];
  endfunction

  // Multiplicative inverse by search (0 maps to 0).
  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    r = '0;
    for (int i = 1; i < GF_Q; i++)
      if (gf_mul(a, gf_t'(i)) == gf_t'(1)) r = gf_t'(i);
    return r;
  endfunction

  // Entry k (0-based) of column n of H for an M x 2M code.
  function automatic edge_t code_edge(hkind_e kind, int n, int k, int M);
    int    rows [3];
    int    vals [3];
    int    cnt;
    int    j;
    edge_t e;
    e   = '0;
    cnt = 0;
    if (n >= M) begin
      // identity part
      rows[0] = n - M; vals[0] = 1; cnt = 1;
    end else begin
      j = n;
      if (kind == H_LDM) begin
        if (j >= M / 2) begin
          rows[0] = j;                   vals[0] = 1;
          rows[1] = (j * 37 + 11) % M;   vals[1] = 1 + (7 * j + 5) % (GF_Q - 1);
        end else begin
          rows[0] = (j * 37 + 11) % M;   vals[0] = 1 + (7 * j) % (GF_Q - 1);
          rows[1] = (j * 101 + 53) % M;  vals[1] = 1 + (7 * j + 5) % (GF_Q - 1);
        end
        cnt = 2;
      end else begin
        rows[0] = j; vals[0] = 1; cnt = 1;
        if (j + 1 < M) begin
          rows[cnt] = j + 1; vals[cnt] = 1; cnt++;
        end
        rows[cnt] = (j * 37 + 11) % M; vals[cnt] = 1 + (7 * j + 5 * cnt) % (GF_Q - 1); cnt++;
      end
      // move a random entry that lands on an earlier row of this column
      for (int a = 1; a < cnt; a++)
        for (int pass = 0; pass < 3; pass++)
          for (int b = 0; b < a; b++)
            if (rows[a] == rows[b]) rows[a] = (rows[a] + 1) % M;
    end
    if (k < cnt) begin
      e.vld = 1'b1;
      e.row = ROW_W'(rows[k]);
      e.h   = gf_t'(vals[k]);
    end
    return e;
  endfunction

endpackage
