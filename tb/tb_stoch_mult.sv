// tb_stoch_mult - checks the truth table of the stochastic multiplier and
// the example of the source's figure: 01011110 (5/8) times 01001110 (4/8)
// gives 01001110 (4/8).
module tb_stoch_mult;
  logic a, b, y;
  int checks = 0, failures = 0;

  stoch_mult dut (.a, .b, .y);

  initial begin
    logic [7:0] sa, sb, sy, exp_y;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (i == 3)) begin failures++; $display("a=%0d b=%0d y=%0d", a, b, y); end
    end
    sa = 8'b01011110; sb = 8'b01001110; exp_y = 8'b01001110;
    for (int i = 7; i >= 0; i--) begin
      a = sa[i]; b = sb[i];
      #1;
      sy[i] = y;
    end
    checks++;
    if (sy !== exp_y) begin failures++; $display("stream %b", sy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
