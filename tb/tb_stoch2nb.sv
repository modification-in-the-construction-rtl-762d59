// tb_stoch2nb - drives random bit streams into the counter and compares the
// count with the number of ones sent while enabled; checks clear and that
// the count saturates instead of wrapping.
module tb_stoch2nb;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, bit_in = 0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int exp_cnt;

  stoch2nb #(.W(W)) dut (.clk, .rst_n, .clear, .en, .bit_in, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (count !== 0) failures++;
    for (int run = 0; run < 20; run++) begin
      clear = 1; en = 0;
      @(negedge clk);
      clear = 0;
      exp_cnt = 0;
      for (int c = 0; c < 50; c++) begin
        en = $urandom_range(0, 3) != 0;
        bit_in = $urandom_range(0, 1);
        if (en && bit_in && exp_cnt < 63) exp_cnt++;
        @(negedge clk);
        checks++;
        if (count !== W'(exp_cnt)) begin
          failures++;
          if (failures < 5) $display("run %0d cycle %0d: %0d vs %0d", run, c, count, exp_cnt);
        end
      end
    end
    // saturation
    clear = 1; @(negedge clk); clear = 0;
    en = 1; bit_in = 1;
    repeat (100) @(negedge clk);
    checks++;
    if (count !== '1) begin failures++; $display("no saturation: %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
