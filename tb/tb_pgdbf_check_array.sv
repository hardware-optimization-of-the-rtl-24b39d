// tb_pgdbf_check_array: checks the interconnection block and CN array at
// Z = 12 (N = 288, M = 144). The testbench builds the parity-check matrix
// itself from the base-matrix rule, checks that it is (3,6)-regular and free
// of 4-cycles, and compares c, the per-VN CN values and syndrome_zero with a
// direct matrix product for random words, the all-zero and the all-one
// codewords.
module tb_pgdbf_check_array;
  import pgdbf_pkg::*;
  localparam int Z = 12;
  localparam int N = 24 * Z;
  localparam int M = 12 * Z;

  logic [N-1:0]         v;
  logic [M-1:0]         c;
  logic [N-1:0][DV-1:0] vn_checks;
  logic                 syndrome_zero;
  int checks = 0, failures = 0;

  localparam int OFF [2][3] = '{'{0, 1, 3}, '{0, 5, 7}};
  bit H[M][N];
  int layer_row[N][3];

  pgdbf_check_array #(.Z(Z)) dut (.v, .c, .vn_checks, .syndrome_zero);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 24; j++)
      for (int l = 0; l < 3; l++)
        for (int a = 0; a < Z; a++) begin
          int row, col;
          row = ((j % 12 + OFF[j / 12][l]) % 12) * Z + a;
          col = j * Z + (a + (l * j) % Z) % Z;
          H[row][col] = 1;
          layer_row[col][l] = row;
        end
    // regularity
    for (int m = 0; m < M; m++) begin
      int w;
      w = 0;
      for (int n = 0; n < N; n++) w += H[m][n];
      check(w == 6, $sformatf("row %0d weight %0d", m, w));
    end
    for (int n = 0; n < N; n++) begin
      int w;
      w = 0;
      for (int m = 0; m < M; m++) w += H[m][n];
      check(w == 3, $sformatf("column %0d weight %0d", n, w));
    end
    // no two columns share two rows (no 4-cycles)
    begin
      int bad;
      bad = 0;
      for (int n1 = 0; n1 < N; n1++)
        for (int n2 = n1 + 1; n2 < N; n2++) begin
          int shared;
          shared = 0;
          for (int l1 = 0; l1 < 3; l1++)
            for (int l2 = 0; l2 < 3; l2++)
              shared += (layer_row[n1][l1] == layer_row[n2][l2]);
          if (shared > 1) bad++;
        end
      check(bad == 0, $sformatf("%0d column pairs in 4-cycles", bad));
    end

    for (int t = 0; t < 60; t++) begin
      if (t == 0) v = '0;
      else if (t == 1) v = '1;
      else for (int n = 0; n < N; n++) v[n] = 1'($urandom_range(0, (t % 5 == 0) ? 30 : 1) == 0);
      #1;
      begin
        bit cref[M];
        bit allz;
        allz = 1;
        for (int m = 0; m < M; m++) begin
          cref[m] = 0;
          for (int n = 0; n < N; n++) if (H[m][n]) cref[m] ^= v[n];
          if (cref[m]) allz = 0;
          check(c[m] == cref[m], $sformatf("t%0d c[%0d]", t, m));
        end
        for (int n = 0; n < N; n++)
          for (int l = 0; l < 3; l++)
            check(vn_checks[n][l] == cref[layer_row[n][l]], $sformatf("t%0d vn_checks[%0d][%0d]", t, n, l));
        check(syndrome_zero == allz, $sformatf("t%0d syndrome_zero", t));
        if (t < 2) check(allz, "codeword not accepted");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
