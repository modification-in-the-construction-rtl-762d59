// rhs_decoder - relaxed half-stochastic (RHS) decoder for a non-binary LDPC
// code over GF(4).
//
// Variable nodes are SPA nodes that keep probability mass functions (PMFs);
// check nodes are stochastic and exchange a single GF(q) symbol per edge
// and iteration. Per edge the decoder stores the check-to-variable PMF V
// (initialised to the equiprobable PMF) and the last variable-to-check
// symbol U. One variable node is processed per clock cycle, all its edges
// (up to DV) in parallel:
//   1. the check node's message is total(check) XOR U_old, divided by the
//      edge coefficient h (permutation node),
//   2. V is relaxed towards that symbol (stochastic-to-SPA conversion),
//   3. for every edge a VNU forms the extrinsic PMF prior * prod(other V),
//   4. a symbol is drawn from it (SPA-to-stochastic conversion), multiplied
//      by h and sent to the check node, whose XOR accumulator collects it,
//   5. a further VNU forms the full posterior; its most likely symbol is
//      counted, in the last DEC_ITERS iterations, by one counter per GF
//      symbol (stochastic to non-binary conversion). Counting the hard
//      decision rather than a random draw from the posterior keeps the
//      sampling noise out of the final decision.
// After the last variable node one extra cycle moves every check node's
// accumulator into its output register (flooding schedule). In the first
// iteration no relaxation happens, since no check message exists yet.
// After MAX_ITER iterations the decoded symbol of each variable node is the
// GF symbol whose counter is largest (lowest symbol on a tie).
//
// Interface: channel PMFs are loaded in variable-node order, one per
// accepted in_valid/in_ready beat (GF_Q probabilities of PROB_W bits, units
// of 1/64). The N decoded symbols then leave in the same order on
// out_valid/out_ready, with out_idx and out_last. Timing: N load beats,
// then exactly MAX_ITER * (N + 1) cycles of decoding, then N output beats.
//
// The SPA variable node, stochastic check node, permutation nodes, the two
// message conversions, the equiprobable initialisation and the
// counter-based output follow the source. The serial node schedule, what
// the counters count, MAX_ITER, DEC_ITERS, the relaxation factor and the
// interface are this design's choices.
module rhs_decoder
  import nbldpc_pkg::*;
#(
  parameter int unsigned N          = 648,
  parameter int unsigned M          = 324,
  parameter int unsigned DV         = 3,
  parameter hkind_e      KIND       = H_LDM,
  parameter int unsigned MAX_ITER   = 32,
  parameter int unsigned DEC_ITERS  = 8,
  parameter int unsigned BETA_SHIFT = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // channel PMFs
  input  logic                 in_valid,
  output logic                 in_ready,
  input  prob_t                in_pmf [GF_Q],
  // decoded symbols
  output logic                 out_valid,
  input  logic                 out_ready,
  output gf_t                  out_sym,
  output logic [$clog2(N)-1:0] out_idx,
  output logic                 out_last,
  output logic                 busy
);
  localparam int unsigned NW    = $clog2(N);
  localparam int unsigned MW    = $clog2(M);
  localparam int unsigned IW    = $clog2(MAX_ITER + 1);
  localparam int unsigned CNT_W = $clog2(DEC_ITERS + 1);
  localparam prob_t       UNI   = prob_t'((1 << PROB_W) / GF_Q);

  typedef prob_t [GF_Q-1:0] pmf_t;
  typedef pmf_t  [DV-1:0]   vrow_t;
  typedef gf_t   [DV-1:0]   urow_t;

  typedef enum logic [1:0] {S_LOAD, S_ITER, S_SWAP, S_OUT} state_e;

  state_e         state;
  logic [NW-1:0]  vn;        // variable node being loaded / processed / output
  logic [IW-1:0]  iter;

  // message memories
  pmf_t  prior_mem [N];
  vrow_t vmem      [N];
  urow_t umem      [N];

  // ---------------------------------------------------------------- edges
  edge_t edges [DV];

  edge_rom #(.N(N), .M(M), .DV(DV), .KIND(KIND)) u_rom (.vn(vn), .edges(edges));

  // -------------------------------------------------------- check nodes
  logic [M-1:0] cn_valid;
  gf_t          cn_in    [M];
  gf_t          cn_total [M];
  logic         cn_clear, cn_iter_end;

  assign cn_clear    = (state == S_LOAD);
  assign cn_iter_end = (state == S_SWAP);

  for (genvar m = 0; m < int'(M); m++) begin : g_cn
    cnu #(.P(GF_P)) u_cnu (
      .clk, .rst_n,
      .clear    (cn_clear),
      .iter_end (cn_iter_end),
      .in_valid (cn_valid[m]),
      .in_sym   (cn_in[m]),
      .total    (cn_total[m])
    );
  end

  // -------------------------------------------------- per-edge datapath
  logic            proc;                 // a variable node is processed
  prob_t           prior_u [GF_Q];
  prob_t           vold    [DV][GF_Q];
  prob_t           vnew    [DV][GF_Q];
  gf_t             cs_perm [DV];         // check message, permuted domain
  gf_t             cs      [DV];         // check message, symbol domain
  gf_t             usym    [DV];
  gf_t             uperm   [DV];
  logic [DV-1:0]   evld;
  prob_t           post    [GF_Q];
  gf_t             psym;

  assign proc = (state == S_ITER);

  always_comb begin
    for (int a = 0; a < int'(GF_Q); a++) prior_u[a] = prior_mem[vn][a];
    for (int k = 0; k < int'(DV); k++) begin
      evld[k] = edges[k].vld;
      for (int a = 0; a < int'(GF_Q); a++) vold[k][a] = vmem[vn][k][a];
      cs_perm[k] = cn_total[edges[k].row[MW-1:0]] ^ umem[vn][k];
    end
  end

  for (genvar k = 0; k < int'(DV); k++) begin : g_edge
    prob_t ext_msg [DV > 1 ? DV-1 : 1][GF_Q];
    logic [(DV > 1 ? DV-1 : 1)-1:0] ext_en;
    prob_t ext_pmf [GF_Q];

    perm_node u_pn_in (.sym_in(cs_perm[k]), .h(edges[k].h), .to_var(1'b1), .sym_out(cs[k]));

    relax_update #(.Q(GF_Q), .W(PROB_W), .BETA_SHIFT(BETA_SHIFT)) u_relax (
      .en      (proc && evld[k] && iter != '0),
      .sym     (cs[k]),
      .pmf_in  (vold[k]),
      .pmf_out (vnew[k])
    );

    // the other edges' messages
    always_comb begin
      ext_en = '0;
      for (int i = 0; i < int'(DV) - 1; i++) begin
        ext_en[i]  = evld[(i < k) ? i : i + 1];
        ext_msg[i] = vnew[(i < k) ? i : i + 1];
      end
      if (DV == 1) begin
        ext_en     = '0;
        ext_msg[0] = vnew[0];
      end
    end

    vnu #(.Q(GF_Q), .W(PROB_W), .NIN(DV > 1 ? DV-1 : 1)) u_vnu (
      .prior(prior_u), .msg(ext_msg), .msg_en(ext_en), .pmf_out(ext_pmf)
    );

    pmf_sampler #(.Q(GF_Q), .W(PROB_W), .SEED(16'hACE1 ^ 16'(k * 16'h3B1D + 16'h0101))) u_smp (
      .clk, .rst_n, .en(proc), .pmf(ext_pmf), .sym(usym[k])
    );

    perm_node u_pn_out (.sym_in(usym[k]), .h(edges[k].h), .to_var(1'b0), .sym_out(uperm[k]));
  end

  // check node inputs: each check gets at most one edge of a variable node
  always_comb begin
    for (int m = 0; m < int'(M); m++) begin
      cn_valid[m] = 1'b0;
      cn_in[m]    = '0;
      for (int k = 0; k < int'(DV); k++)
        if (proc && evld[k] && int'(edges[k].row) == m) begin
          cn_valid[m] = 1'b1;
          cn_in[m]    = uperm[k];
        end
    end
  end

  // ------------------------------------------------- posterior / decision
  vnu #(.Q(GF_Q), .W(PROB_W), .NIN(DV)) u_vnu_post (
    .prior(prior_u), .msg(vnew), .msg_en(evld), .pmf_out(post)
  );

  // hard decision of the posterior (lowest symbol on a tie)
  always_comb begin
    prob_t pbest;
    pbest = post[0];
    psym  = '0;
    for (int a = 1; a < int'(GF_Q); a++)
      if (post[a] > pbest) begin
        pbest = post[a];
        psym  = gf_t'(a);
      end
  end

  logic             count_win;
  logic [CNT_W-1:0] cnt [N][GF_Q];

  assign count_win = proc && (int'(iter) >= int'(MAX_ITER) - int'(DEC_ITERS));

  for (genvar n = 0; n < int'(N); n++) begin : g_dec
    for (genvar a = 0; a < int'(GF_Q); a++) begin : g_sym
      stoch2nb #(.W(CNT_W)) u_cnt (
        .clk, .rst_n,
        .clear  (state == S_LOAD),
        .en     (count_win && vn == NW'(n)),
        .bit_in (psym == gf_t'(a)),
        .count  (cnt[n][a])
      );
    end
  end

  always_comb begin
    logic [CNT_W-1:0] best;
    best    = cnt[vn][0];
    out_sym = '0;
    for (int a = 1; a < int'(GF_Q); a++)
      if (cnt[vn][a] > best) begin
        best    = cnt[vn][a];
        out_sym = gf_t'(a);
      end
  end

  // ------------------------------------------------------------ control
  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_idx   = vn;
  assign out_last  = (state == S_OUT) && (vn == NW'(N - 1));
  assign busy      = (state != S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      vn    <= '0;
      iter  <= '0;
    end else begin
      unique case (state)
        S_LOAD:
          if (in_valid) begin
            if (vn == NW'(N - 1)) begin
              vn    <= '0;
              iter  <= '0;
              state <= S_ITER;
            end else begin
              vn <= vn + 1'b1;
            end
          end
        S_ITER:
          if (vn == NW'(N - 1)) begin
            vn    <= '0;
            state <= S_SWAP;
          end else begin
            vn <= vn + 1'b1;
          end
        S_SWAP: begin
          iter <= iter + 1'b1;
          if (iter == IW'(MAX_ITER - 1)) state <= S_OUT;
          else                           state <= S_ITER;
        end
        S_OUT:
          if (out_ready) begin
            if (vn == NW'(N - 1)) begin
              vn    <= '0;
              state <= S_LOAD;
            end else begin
              vn <= vn + 1'b1;
            end
          end
        default: state <= S_LOAD;
      endcase
    end
  end

  // memories
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      for (int a = 0; a < int'(GF_Q); a++) begin
        prior_mem[vn][a] <= in_pmf[a];
        for (int k = 0; k < int'(DV); k++) vmem[vn][k][a] <= UNI;
      end
      umem[vn] <= '0;
    end else if (proc) begin
      for (int k = 0; k < int'(DV); k++) begin
        for (int a = 0; a < int'(GF_Q); a++) vmem[vn][k][a] <= vnew[k][a];
        umem[vn][k] <= uperm[k];
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_idx));
endmodule
