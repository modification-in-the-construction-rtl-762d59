// tb_nbldpc_top - end-to-end test of the top level at its default size:
// the (648, 324) GF(4) code with the LDM matrix, 32 iterations.
//
// Two frames go through the decoder: an all-zero codeword with clean channel
// PMFs, then a random codeword (systematic encoding with H = [R | I]) with
// 12 corrupted symbols whose channel PMF favours a wrong value (30/64
// against 18/64 for the sent one). While the decoder works, the stochastic
// multiplier computes a series of products next to it.
// Checks: every decoded symbol, the decoding latency MAX_ITER * (N + 1),
// the output order and out_last, output back-pressure, and each product
// within 24 counts of a*b/256. It also counts how often each mechanism
// occurred (check-message relaxation, permutation by a coefficient other
// than 1, symbols sent to check nodes, iteration ends, posterior samples
// counted for the decision, corrected channel errors, output stalls,
// stochastic multiplications) and fails if one never did.
module tb_nbldpc_top;
  import nbldpc_pkg::*;
  localparam int N = 648, M = 324, DV = 3, MAX_ITER = 32;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready, out_valid, out_ready = 1, out_last, busy;
  prob_t in_pmf [GF_Q];
  gf_t   out_sym;
  logic [$clog2(N)-1:0] out_idx;
  logic  mul_start = 0, mul_busy, mul_done;
  logic [7:0] mul_a = 0, mul_b = 0, mul_product;
  int checks = 0, failures = 0;
  int n_relax = 0, n_perm = 0, n_cn_in = 0, n_iter_end = 0, n_count = 0;
  int n_corrected = 0, n_stall = 0, n_mul = 0;
  bit dec_done = 0;

  nbldpc_top dut (
    .clk, .rst_n,
    .dec_in_valid (in_valid), .dec_in_ready (in_ready), .dec_in_pmf (in_pmf),
    .dec_out_valid(out_valid), .dec_out_ready(out_ready), .dec_out_sym(out_sym),
    .dec_out_idx  (out_idx), .dec_out_last(out_last), .dec_busy(busy),
    .mul_start, .mul_a, .mul_b, .mul_busy, .mul_done, .mul_product
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2 * (MAX_ITER + 3) * (N + 1) + 5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_dec.proc)
      for (int k = 0; k < DV; k++)
        if (dut.u_dec.evld[k]) begin
          if (dut.u_dec.iter != 0) n_relax++;
          if (dut.u_dec.edges[k].h != gf_t'(1)) n_perm++;
        end
    if (rst_n) begin
    n_cn_in    += $countones(dut.u_dec.cn_valid);
    n_iter_end += dut.u_dec.cn_iter_end;
    n_count    += dut.u_dec.count_win;
    end
  end

  function automatic gf_t gmul(gf_t a, gf_t b);
    logic [1:0] t [4][4] = '{'{0,0,0,0}, '{0,1,2,3}, '{0,2,3,1}, '{0,3,1,2}};
    return t[a][b];
  endfunction

  // stochastic multiplier running beside the decoder
  initial begin
    @(posedge rst_n);
    while (!dec_done) begin
      int x, y, want;
      x = $urandom_range(0, 255);
      y = $urandom_range(0, 255);
      @(negedge clk);
      mul_a = 8'(x); mul_b = 8'(y); mul_start = 1;
      @(negedge clk);
      mul_start = 0;
      while (!mul_done) @(negedge clk);
      want = x * y / 256;
      n_mul++;
      checks++;
      if (int'(mul_product) > want + 24 || int'(mul_product) < want - 24) begin
        failures++; $display("%0d*%0d: got %0d want %0d", x, y, mul_product, want);
      end
    end
  end

  initial begin
    gf_t cw [N];
    int  corrupt [N];
    for (int f = 0; f < 2; f++) begin
      int t0;
      for (int j = 0; j < M; j++) cw[j] = gf_t'(f == 0 ? 0 : $urandom);
      for (int i = 0; i < M; i++) cw[M + i] = '0;
      for (int j = 0; j < M; j++)
        for (int k = 0; k < DV; k++) begin
          edge_t e;
          e = code_edge(H_LDM, j, k, M);
          if (e.vld) cw[M + int'(e.row)] ^= gmul(e.h, cw[j]);
        end
      foreach (corrupt[n]) corrupt[n] = 0;
      if (f == 1) for (int e = 0; e < 12; e++) corrupt[$urandom_range(0, N - 1)] = 1;
      if (f == 0) begin
        repeat (3) @(negedge clk);
        rst_n = 1;
      end
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1;
        for (int a = 0; a < GF_Q; a++) in_pmf[a] = 8;
        if (corrupt[n]) begin
          in_pmf[cw[n]] = 18;
          in_pmf[cw[n] ^ 2'(1 + $urandom_range(0, 2))] = 30;
        end else begin
          in_pmf[cw[n]] = 40;
        end
        @(posedge clk);
        checks++;
        if (!in_ready) begin failures++; $display("not ready at load beat %0d", n); end
      end
      @(negedge clk);
      in_valid = 0;
      t0 = 0;
      while (!out_valid) begin @(negedge clk); t0++; end
      checks++;
      if (t0 != MAX_ITER * (N + 1)) begin failures++; $display("frame %0d latency %0d", f, t0); end
      for (int n = 0; n < N; n++) begin
        if (n % 100 == 7) begin
          gf_t held;
          held = out_sym;
          out_ready = 0;
          repeat (2) @(negedge clk);
          n_stall++;
          checks++;
          if (!out_valid || int'(out_idx) != n || out_sym != held) begin failures++; $display("stall lost data"); end
          out_ready = 1;
        end
        checks++;
        if (!out_valid || int'(out_idx) != n || out_last != (n == N - 1)) begin
          failures++; $display("frame %0d beat %0d: idx %0d last %0d", f, n, out_idx, out_last);
        end
        checks++;
        if (out_sym != cw[n]) begin
          failures++;
          $display("frame %0d symbol %0d: decoded %0d sent %0d corrupted %0d", f, n, out_sym, cw[n], corrupt[n]);
        end else if (corrupt[n]) begin
          n_corrected++;
        end
        @(negedge clk);
      end
    end
    dec_done = 1;
    repeat (300) @(negedge clk);
    $display("relaxations %0d, permutations by h>1 %0d, check inputs %0d, iteration ends %0d",
             n_relax, n_perm, n_cn_in, n_iter_end);
    $display("decision samples %0d, corrected symbols %0d, output stalls %0d, multiplications %0d",
             n_count, n_corrected, n_stall, n_mul);
    checks++; if (n_relax == 0)     begin failures++; $display("no relaxation");  end
    checks++; if (n_perm == 0)      begin failures++; $display("no permutation"); end
    checks++; if (n_cn_in == 0)     begin failures++; $display("no check input"); end
    checks++; if (n_iter_end != 2 * MAX_ITER) begin failures++; $display("iteration ends %0d", n_iter_end); end
    checks++; if (n_count != 2 * 8 * N) begin failures++; $display("decision samples %0d", n_count); end
    checks++; if (n_corrected == 0) begin failures++; $display("nothing corrected"); end
    checks++; if (n_stall == 0)     begin failures++; $display("no stall"); end
    checks++; if (n_mul == 0)       begin failures++; $display("no multiplication"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
