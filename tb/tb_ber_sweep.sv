// tb_ber_sweep - bit error rate of the full-size (648, 324) GF(4) code with
// both matrix forms, LDM and DDM, over an AWGN channel.
//
// Each GF(4) symbol is sent as two BPSK bits (+1 for 0, -1 for 1) with
// Gaussian noise of variance sigma^2 = 10^(-SNR/10). The receiver forms the
// symbol PMF from the two bit likelihoods, quantises it to 6-bit
// probabilities (units of 1/64) and hands it to the decoder. For each SNR
// point one random codeword per matrix form is decoded, and the bit error
// rate of the channel's hard decisions is printed next to that of the
// decoder's output. Checks: at the highest SNR the decoder leaves no more
// bit errors than the channel's hard decisions had, decoding takes
// MAX_ITER * (N + 1) cycles, and every frame returns N symbols.
module tb_ber_sweep;
  import nbldpc_pkg::*;
  localparam int N = 648, M = 324, DV = 3, MAX_ITER = 32;
  localparam int NSNR = 3;
  localparam real SNR_DB [NSNR] = '{2.0, 5.0, 8.0};

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, out_ready = 1;
  prob_t in_pmf [GF_Q];
  logic  in_ready [2], out_valid [2], out_last [2], busy [2];
  gf_t   out_sym [2];
  logic [$clog2(N)-1:0] out_idx [2];
  logic  mul_busy [2], mul_done [2];
  logic [7:0] mul_product [2];
  int    sel = 0;
  int checks = 0, failures = 0;

  nbldpc_top u_ldm (
    .clk, .rst_n,
    .dec_in_valid (in_valid && sel == 0), .dec_in_ready(in_ready[0]), .dec_in_pmf(in_pmf),
    .dec_out_valid(out_valid[0]), .dec_out_ready(out_ready), .dec_out_sym(out_sym[0]),
    .dec_out_idx(out_idx[0]), .dec_out_last(out_last[0]), .dec_busy(busy[0]),
    .mul_start(1'b0), .mul_a(8'd0), .mul_b(8'd0),
    .mul_busy(mul_busy[0]), .mul_done(mul_done[0]), .mul_product(mul_product[0])
  );

  nbldpc_top #(.KIND(H_DDM)) u_ddm (
    .clk, .rst_n,
    .dec_in_valid (in_valid && sel == 1), .dec_in_ready(in_ready[1]), .dec_in_pmf(in_pmf),
    .dec_out_valid(out_valid[1]), .dec_out_ready(out_ready), .dec_out_sym(out_sym[1]),
    .dec_out_idx(out_idx[1]), .dec_out_last(out_last[1]), .dec_busy(busy[1]),
    .mul_start(1'b0), .mul_a(8'd0), .mul_b(8'd0),
    .mul_busy(mul_busy[1]), .mul_done(mul_done[1]), .mul_product(mul_product[1])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2 * NSNR * (MAX_ITER + 3) * (N + 1) + 5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gf_t gmul(gf_t a, gf_t b);
    logic [1:0] t [4][4] = '{'{0,0,0,0}, '{0,1,2,3}, '{0,2,3,1}, '{0,3,1,2}};
    return t[a][b];
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int popc2(gf_t x);
    return int'(x[0]) + int'(x[1]);
  endfunction

  initial begin
    gf_t  cw [N];
    gf_t  hard [N];
    prob_t pmfs [N][GF_Q];
    hkind_e kinds [2] = '{H_LDM, H_DDM};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSNR; s++) begin
      for (int c = 0; c < 2; c++) begin
        real sigma2;
        int  ch_err, dec_err, t0;
        sel = c;
        sigma2 = 10.0 ** (-SNR_DB[s] / 10.0);
        // encode
        for (int j = 0; j < M; j++) cw[j] = gf_t'($urandom);
        for (int i = 0; i < M; i++) cw[M + i] = '0;
        for (int j = 0; j < M; j++)
          for (int k = 0; k < DV; k++) begin
            edge_t e;
            e = code_edge(kinds[c], j, k, M);
            if (e.vld) cw[M + int'(e.row)] ^= gmul(e.h, cw[j]);
          end
        // channel
        ch_err = 0;
        for (int n = 0; n < N; n++) begin
          real y [2];
          real p1 [2];
          real pa [GF_Q];
          real tot;
          for (int b = 0; b < 2; b++) begin
            y[b]  = (cw[n][b] ? -1.0 : 1.0) + $sqrt(sigma2) * gauss();
            p1[b] = 1.0 / (1.0 + $exp(2.0 * y[b] / sigma2));
          end
          tot = 0.0;
          for (int a = 0; a < GF_Q; a++) begin
            pa[a] = (a[0] ? p1[0] : 1.0 - p1[0]) * (a[1] ? p1[1] : 1.0 - p1[1]);
            tot += pa[a];
          end
          for (int a = 0; a < GF_Q; a++) begin
            int q;
            q = int'($floor(63.0 * pa[a] / tot));
            pmfs[n][a] = prob_t'(q > 63 ? 63 : q);
          end
          hard[n] = {y[1] < 0.0, y[0] < 0.0};
          ch_err += popc2(hard[n] ^ cw[n]);
        end
        // decode
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          in_valid = 1;
          in_pmf = pmfs[n];
        end
        @(negedge clk);
        in_valid = 0;
        t0 = 0;
        while (!out_valid[c]) begin @(negedge clk); t0++; end
        checks++;
        if (t0 != MAX_ITER * (N + 1)) begin failures++; $display("latency %0d", t0); end
        dec_err = 0;
        for (int n = 0; n < N; n++) begin
          checks++;
          if (!out_valid[c] || int'(out_idx[c]) != n) begin failures++; $display("output order"); end
          dec_err += popc2(out_sym[c] ^ cw[n]);
          @(negedge clk);
        end
        $display("%s SNR %4.1f dB: channel BER %7.5f  decoded BER %7.5f",
                 c == 0 ? "LDM" : "DDM", SNR_DB[s], real'(ch_err) / (2.0 * N), real'(dec_err) / (2.0 * N));
        if (s == NSNR - 1) begin
          checks++;
          if (dec_err > ch_err) begin failures++; $display("decoder added errors"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
