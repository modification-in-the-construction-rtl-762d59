// tb_lfsr - checks the LFSR against an independent model of the Galois
// shift (x^16 + x^14 + x^13 + x^11 + 1), that it holds when en is low, and
// that its period is 2^16 - 1 without ever reaching zero.
module tb_lfsr;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [15:0] rnd, model;
  int checks = 0, failures = 0;
  int unsigned cycles = 0;

  lfsr #(.WIDTH(16), .TAPS(16'hB400), .SEED(16'hACE1)) dut (.clk, .rst_n, .en, .rnd);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] step(logic [15:0] s);
    logic fb;
    fb = s[0];
    s = {1'b0, s[15:1]};
    if (fb) begin
      s[15] = ~s[15]; s[13] = ~s[13]; s[12] = ~s[12]; s[10] = ~s[10];
    end
    return s;
  endfunction

  initial begin
    int period;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (rnd !== 16'hACE1) begin failures++; $display("seed wrong %h", rnd); end
    model = 16'hACE1;
    en = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      model = step(model);
      checks++;
      if (rnd !== model) begin failures++; if (failures < 5) $display("step %0d: %h vs %h", i, rnd, model); end
    end
    en = 0;
    repeat (5) @(negedge clk);
    checks++; if (rnd !== model) begin failures++; $display("moved while disabled"); end
    en = 1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      if (rnd == 16'h0) begin failures++; $display("reached zero"); break; end
    end while (rnd != model && period < 70000);
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
