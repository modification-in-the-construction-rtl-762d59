// tb_edge_rom - checks the two matrix structures at full size (324 x 648):
// the right half is the identity; in the LDM form the left half has a one
// on the diagonal exactly in its lower half rows, in the DDM form on the
// diagonal and on the sub-diagonal; every entry has a non-zero coefficient,
// no column repeats a row, and every row is used.
module tb_edge_rom;
  import nbldpc_pkg::*;
  localparam int N = 648, M = 324, DV = 3;
  logic [$clog2(N)-1:0] vn;
  edge_t e_ldm [DV];
  edge_t e_ddm [DV];
  int checks = 0, failures = 0;

  edge_rom #(.N(N), .M(M), .DV(DV), .KIND(H_LDM)) u_ldm (.vn, .edges(e_ldm));
  edge_rom #(.N(N), .M(M), .DV(DV), .KIND(H_DDM)) u_ddm (.vn, .edges(e_ddm));

  task automatic check_col(string name, int n, edge_t e [DV], hkind_e kind);
    int cnt;
    bit has_diag, has_sub;
    cnt = 0; has_diag = 0; has_sub = 0;
    for (int k = 0; k < DV; k++) if (e[k].vld) begin
      cnt++;
      checks++;
      if (e[k].h == 0 || int'(e[k].row) >= M) begin failures++; $display("%s col %0d bad entry", name, n); end
      for (int j = 0; j < k; j++) if (e[j].vld && e[j].row == e[k].row) begin
        failures++; $display("%s col %0d repeats row", name, n);
      end
      if (n < M && int'(e[k].row) == n && e[k].h == 1) has_diag = 1;
      if (n < M && int'(e[k].row) == n + 1 && e[k].h == 1) has_sub = 1;
    end
    checks++;
    if (n >= M) begin
      if (!(cnt == 1 && e[0].vld && int'(e[0].row) == n - M && e[0].h == 1)) begin
        failures++; $display("%s col %0d not identity", name, n);
      end
    end else if (kind == H_LDM) begin
      if (cnt != 2 || (n >= M / 2 && !has_diag)) begin
        failures++; $display("%s col %0d count %0d diag %0d", name, n, cnt, has_diag);
      end
    end else begin
      if (!has_diag || (n + 1 < M && !has_sub) || cnt != ((n + 1 < M) ? 3 : 2)) begin
        failures++; $display("%s col %0d diag %0d sub %0d count %0d", name, n, has_diag, has_sub, cnt);
      end
    end
  endtask

  initial begin
    int used_l [M];
    int used_d [M];
    foreach (used_l[i]) begin used_l[i] = 0; used_d[i] = 0; end
    for (int n = 0; n < N; n++) begin
      vn = ($clog2(N))'(n);
      #1;
      check_col("LDM", n, e_ldm, H_LDM);
      check_col("DDM", n, e_ddm, H_DDM);
      for (int k = 0; k < DV; k++) begin
        if (e_ldm[k].vld) used_l[e_ldm[k].row]++;
        if (e_ddm[k].vld) used_d[e_ddm[k].row]++;
      end
    end
    for (int m = 0; m < M; m++) begin
      checks++;
      if (used_l[m] < 2 || used_d[m] < 2) begin failures++; $display("row %0d weight %0d/%0d", m, used_l[m], used_d[m]); end
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
