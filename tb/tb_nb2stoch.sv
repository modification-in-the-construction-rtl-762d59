// tb_nb2stoch - checks every output bit of the converter against
// x > (low W bits of an LFSR model), and that the density of ones over
// 4096 cycles is close to x / 2^W for several x.
module tb_nb2stoch;
  localparam int W = 8;
  logic         clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] x;
  logic         bit_out;
  logic [15:0]  model;
  int checks = 0, failures = 0;

  nb2stoch #(.W(W), .SEED(16'h1234), .TAPS(16'hB400)) dut (.clk, .rst_n, .en, .x, .bit_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] step(logic [15:0] s);
    return (s >> 1) ^ (s[0] ? 16'hB400 : 16'h0);
  endfunction

  initial begin
    int xs [5] = '{0, 32, 128, 200, 255};
    x = 0;
    model = step(16'h1234);  // one enabled edge passes before the first check
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    foreach (xs[i]) begin
      int ones;
      ones = 0;
      x = W'(xs[i]);
      for (int c = 0; c < 4096; c++) begin
        @(negedge clk);
        checks++;
        if (bit_out !== (x > model[W-1:0])) begin
          failures++;
          if (failures < 5) $display("x=%0d rnd=%0d bit=%0d", x, model[W-1:0], bit_out);
        end
        ones += bit_out;
        @(posedge clk);
        model = step(model);
      end
      checks++;
      if ((ones - xs[i] * 16) > 200 || (xs[i] * 16 - ones) > 200) begin
        failures++;
        $display("density x=%0d ones=%0d of 4096", xs[i], ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
