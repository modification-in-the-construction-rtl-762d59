// tb_vnu - compares the VNU output with 64 * f(a) * prod V_i(a) / sum,
// computed in real arithmetic, for random inputs (allowed error: one unit
// of truncation, output saturated at 63), checks that a disabled message
// has no effect and that an all-zero product gives the uniform PMF.
module tb_vnu;
  localparam int Q = 4, W = 6, NIN = 2;
  logic [W-1:0]   prior [Q];
  logic [W-1:0]   msg [NIN][Q];
  logic [NIN-1:0] msg_en;
  logic [W-1:0]   pmf_out [Q];
  int checks = 0, failures = 0;

  vnu #(.Q(Q), .W(W), .NIN(NIN)) dut (.prior, .msg, .msg_en, .pmf_out);

  task automatic check_ref(string what);
    real p [Q];
    real s;
    s = 0.0;
    for (int a = 0; a < Q; a++) begin
      p[a] = real'(prior[a]);
      for (int i = 0; i < NIN; i++) if (msg_en[i]) p[a] = p[a] * real'(msg[i][a]);
      s += p[a];
    end
    for (int a = 0; a < Q; a++) begin
      real e;
      e = (s == 0.0) ? 16.0 : 64.0 * p[a] / s;
      if (e > 63.0) e = 63.0;
      checks++;
      if (real'(pmf_out[a]) > e + 0.01 || real'(pmf_out[a]) < e - 1.05) begin
        failures++;
        if (failures < 8) $display("%s a=%0d out=%0d exp=%f", what, a, pmf_out[a], e);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      foreach (prior[a]) prior[a] = W'($urandom);
      foreach (msg[i, a]) msg[i][a] = W'($urandom);
      msg_en = NIN'($urandom);
      #1;
      check_ref("random");
    end
    // one dominant symbol
    prior = '{10, 40, 10, 4};
    msg[0] = '{5, 50, 5, 4};
    msg[1] = '{16, 16, 16, 16};
    msg_en = '1;
    #1;
    check_ref("peak");
    checks++;
    if (pmf_out[1] < 60) begin failures++; $display("peak %0d", pmf_out[1]); end
    // all zero
    prior = '{0, 0, 0, 0};
    #1;
    check_ref("zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
