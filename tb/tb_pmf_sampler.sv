// tb_pmf_sampler - draws 8192 symbols from several PMFs and checks the
// histogram against the PMF (within 3 percentage points), that symbols of
// probability zero never appear, and that a one-hot PMF always gives its
// symbol.
module tb_pmf_sampler;
  localparam int Q = 4, W = 6;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] pmf [Q];
  logic [1:0] sym;
  int checks = 0, failures = 0;

  pmf_sampler #(.Q(Q), .W(W), .SEED(16'h7A31)) dut (.clk, .rst_n, .en, .pmf, .sym);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int p0, p1, p2, p3);
    int hist [Q];
    int tot;
    pmf = '{W'(p0), W'(p1), W'(p2), W'(p3)};
    tot = p0 + p1 + p2 + p3;
    hist = '{0, 0, 0, 0};
    for (int c = 0; c < 8192; c++) begin
      @(negedge clk);
      hist[sym]++;
    end
    for (int a = 0; a < Q; a++) begin
      real want, got;
      want = real'(pmf[a]) / real'(tot);
      got  = real'(hist[a]) / 8192.0;
      checks++;
      if (got > want + 0.03 || got < want - 0.03 || (pmf[a] == 0 && hist[a] != 0)) begin
        failures++;
        $display("pmf %0d/%0d/%0d/%0d: symbol %0d got %f want %f", p0, p1, p2, p3, a, got, want);
      end
    end
  endtask

  initial begin
    pmf = '{16, 16, 16, 16};
    repeat (2) @(posedge clk);
    rst_n = 1;
    en = 1;
    run(16, 16, 16, 16);
    run(40, 8, 8, 8);
    run(0, 0, 63, 1);
    run(5, 30, 0, 29);
    run(0, 0, 0, 63);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
