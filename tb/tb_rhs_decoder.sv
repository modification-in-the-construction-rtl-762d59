// tb_rhs_decoder - decodes frames of a reduced code (24 variable nodes,
// 12 checks, LDM matrix) end to end.
//
// Every frame is a codeword built by systematic encoding with the same
// matrix construction (H = [R | I], so parity symbol i is the GF(4) sum of
// row i of R times the information symbols). The channel PMF of a symbol
// gives the sent symbol 40/64 and the others 8/64; in a corrupted symbol a
// wrong value gets 30/64 and the sent one 18/64, so a hard decision on the
// channel alone would be wrong there. Checks: every decoded symbol equals
// the sent one, the decoding takes exactly MAX_ITER * (N + 1) cycles, the
// output indices run 0..N-1 with out_last on the last, and back-pressure on
// the output holds the symbol.
module tb_rhs_decoder;
  import nbldpc_pkg::*;
  localparam int N = 24, M = 12, DV = 3, MAX_ITER = 32;
  localparam int FRAMES = 8;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready, out_valid, out_ready = 1, out_last, busy;
  prob_t in_pmf [GF_Q];
  gf_t   out_sym;
  logic [$clog2(N)-1:0] out_idx;
  int checks = 0, failures = 0;
  int relax_cnt = 0, perm_cnt = 0, err_in = 0;

  rhs_decoder #(.N(N), .M(M), .DV(DV), .KIND(H_LDM), .MAX_ITER(MAX_ITER),
                .DEC_ITERS(8), .BETA_SHIFT(3)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_pmf,
    .out_valid, .out_ready, .out_sym, .out_idx, .out_last, .busy
  );

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES * (MAX_ITER + 3) * (N + 1) + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // relaxation steps and non-trivial permutations seen
  always @(posedge clk) if (dut.proc) begin
    for (int k = 0; k < DV; k++)
      if (dut.evld[k]) begin
        if (dut.iter != 0) relax_cnt++;
        if (dut.edges[k].h != gf_t'(1)) perm_cnt++;
      end
  end

  function automatic gf_t gmul(gf_t a, gf_t b);
    // GF(4) table, a^2 = a + 1
    logic [1:0] t [4][4] = '{'{0,0,0,0}, '{0,1,2,3}, '{0,2,3,1}, '{0,3,1,2}};
    return t[a][b];
  endfunction

  initial begin
    gf_t cw [N];
    int  corrupt [N];
    for (int f = 0; f < FRAMES; f++) begin
      int t0, lat, nerr;
      // encode
      for (int j = 0; j < M; j++) cw[j] = gf_t'(f == 0 ? 0 : $urandom);
      for (int i = 0; i < M; i++) cw[M + i] = '0;
      for (int j = 0; j < M; j++)
        for (int k = 0; k < DV; k++) begin
          edge_t e;
          e = code_edge(H_LDM, j, k, M);
          if (e.vld) cw[M + int'(e.row)] ^= gmul(e.h, cw[j]);
        end
      nerr = (f < 2) ? 0 : (f < 5 ? 1 : 2);
      foreach (corrupt[n]) corrupt[n] = 0;
      for (int e = 0; e < nerr; e++) corrupt[$urandom_range(0, N - 1)] = 1;
      if (f == 0) begin
        repeat (3) @(posedge clk);
        rst_n = 1;
      end
      // load
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1;
        for (int a = 0; a < GF_Q; a++) in_pmf[a] = 8;
        if (corrupt[n]) begin
          in_pmf[cw[n]] = 18;
          in_pmf[cw[n] ^ 2'(1 + $urandom_range(0, 2))] = 30;
          err_in++;
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
      lat = t0;
      checks++;
      if (lat != MAX_ITER * (N + 1)) begin failures++; $display("frame %0d latency %0d", f, lat); end
      for (int n = 0; n < N; n++) begin
        if (f == 3 && n == 5) begin
          gf_t held;
          held = out_sym;
          out_ready = 0;
          repeat (3) @(negedge clk);
          checks++;
          if (!out_valid || out_idx != 5 || out_sym != held) begin failures++; $display("stall lost data"); end
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
        end
        @(negedge clk);
      end
    end
    checks++;
    if (relax_cnt == 0 || perm_cnt == 0 || err_in == 0) begin
      failures++; $display("mechanism not exercised: relax %0d perm %0d errors %0d", relax_cnt, perm_cnt, err_in);
    end
    $display("relaxation steps %0d, permutations by h>1 %0d, corrupted symbols %0d", relax_cnt, perm_cnt, err_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
