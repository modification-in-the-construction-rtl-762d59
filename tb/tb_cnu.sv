// tb_cnu - feeds random GF(4) symbols into the check node over several
// iterations and checks that after each iteration strobe the output equals
// the XOR of that iteration's inputs, and that clear empties it.
module tb_cnu;
  logic clk = 0, rst_n = 0, clear = 0, iter_end = 0, in_valid = 0;
  logic [1:0] in_sym, total;
  int checks = 0, failures = 0;

  cnu #(.P(2)) dut (.clk, .rst_n, .clear, .iter_end, .in_valid, .in_sym, .total);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] ref_x, prev;
    in_sym = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = 0;
    for (int it = 0; it < 40; it++) begin
      ref_x = 0;
      for (int c = 0; c < 10; c++) begin
        @(negedge clk);
        in_valid = $urandom_range(0, 1);
        in_sym   = 2'($urandom);
        if (in_valid) ref_x ^= in_sym;
        // total holds the previous iteration's result all along
        checks++;
        if (total !== prev) begin failures++; $display("total changed mid-iteration"); end
      end
      @(negedge clk);
      in_valid = 0;
      iter_end = 1;
      @(negedge clk);
      iter_end = 0;
      checks++;
      if (total !== ref_x) begin failures++; $display("it %0d: %0d vs %0d", it, total, ref_x); end
      prev = ref_x;
    end
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (total !== 0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
