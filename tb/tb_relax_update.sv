// tb_relax_update - compares the relaxed PMF with V - V/8 + 8*[a == sym]
// (saturated at 63) for random PMFs and symbols, checks the pass-through
// when disabled, and that repeated updates with one symbol drive the PMF
// from uniform to 63 for that symbol and the floor value 7 for the others.
module tb_relax_update;
  localparam int Q = 4, W = 6, B = 3;
  logic en;
  logic [1:0] sym;
  logic [W-1:0] pmf_in [Q];
  logic [W-1:0] pmf_out [Q];
  int checks = 0, failures = 0;

  relax_update #(.Q(Q), .W(W), .BETA_SHIFT(B)) dut (.en, .sym, .pmf_in, .pmf_out);

  initial begin
    for (int t = 0; t < 500; t++) begin
      en = $urandom_range(0, 3) != 0;
      sym = 2'($urandom);
      foreach (pmf_in[a]) pmf_in[a] = W'($urandom);
      #1;
      foreach (pmf_in[a]) begin
        int e;
        e = pmf_in[a];
        if (en) begin
          e = e - (e / 8) + ((a == sym) ? 8 : 0);
          if (e > 63) e = 63;
        end
        checks++;
        if (pmf_out[a] !== W'(e)) begin
          failures++;
          if (failures < 5) $display("in=%0d sym=%0d a=%0d out=%0d exp=%0d", pmf_in[a], sym, a, pmf_out[a], e);
        end
      end
    end
    // convergence towards symbol 2
    en = 1; sym = 2;
    foreach (pmf_in[a]) pmf_in[a] = 16;
    for (int t = 0; t < 30; t++) begin
      #1;
      pmf_in = pmf_out;
    end
    checks++;
    if (!(pmf_in[2] == 63 && pmf_in[0] == 7 && pmf_in[1] == 7 && pmf_in[3] == 7)) begin
      failures++;
      $display("no convergence: %0d %0d %0d %0d", pmf_in[0], pmf_in[1], pmf_in[2], pmf_in[3]);
    end
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
