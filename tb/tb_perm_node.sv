// tb_perm_node - checks multiplication and division by the edge
// coefficient for every symbol/coefficient pair against the GF(4) table
// (elements 0, 1, a, a+1 with a^2 = a + 1), and that dividing undoes
// multiplying.
module tb_perm_node;
  import nbldpc_pkg::*;
  gf_t sym_in, h, sym_out;
  logic to_var;
  int checks = 0, failures = 0;

  perm_node dut (.sym_in, .h, .to_var, .sym_out);

  // multiplication table of GF(4)
  localparam logic [1:0] MUL [4][4] = '{
    '{0, 0, 0, 0},
    '{0, 1, 2, 3},
    '{0, 2, 3, 1},
    '{0, 3, 1, 2}
  };

  initial begin
    for (int s = 0; s < 4; s++)
      for (int c = 1; c < 4; c++) begin
        sym_in = gf_t'(s); h = gf_t'(c); to_var = 0;
        #1;
        checks++;
        if (sym_out !== MUL[s][c]) begin failures++; $display("%0d*%0d=%0d", s, c, sym_out); end
        sym_in = MUL[s][c]; to_var = 1;
        #1;
        checks++;
        if (sym_out !== gf_t'(s)) begin failures++; $display("(%0d*%0d)/%0d=%0d", s, c, c, sym_out); end
      end
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
