// tb_sc_multiplier - multiplies several pairs of 8-bit numbers and checks
// the stochastic result against a*b/256 within 24 counts (about 3.5
// standard deviations of a 256-bit stream), that done is seen 257 cycles
// after the start edge (a window of 256 counted cycles plus the registered
// done), and that zero times anything is zero.
module tb_sc_multiplier;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] a, b, product;
  int checks = 0, failures = 0;

  sc_multiplier #(.W(W)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .product);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(input int x, y);
    int cyc, want;
    @(negedge clk);
    a = W'(x); b = W'(y); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    want = x * y / 256;
    checks++;
    if (cyc != 257) begin failures++; $display("latency %0d", cyc); end
    checks++;
    if (int'(product) > want + 24 || int'(product) < want - 24 || (x == 0 && product != 0)) begin
      failures++;
      $display("%0d*%0d: got %0d want %0d", x, y, product, want);
    end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mul(160, 128);   // 5/8 * 4/8, the example of the figure
    mul(255, 255);
    mul(128, 128);
    mul(0, 200);
    mul(64, 192);
    mul(200, 30);
    mul(100, 250);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
