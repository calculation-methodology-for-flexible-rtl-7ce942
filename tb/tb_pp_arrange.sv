// Testbench of the partial-product arrangement (k = 8): random block
// products; every row is compared with the sum of its two products shifted
// to their weights 2^(k(i+j)), rows 1..6 must not overlap inside a row
// (each product stays in its own 2k-bit field), and the seven rows must sum
// to the sum of all sixteen weighted products.
module tb_pp_arrange;
  localparam int K = 8;
  logic [2*K-1:0] prod [4][4];
  logic [8*K-1:0] rows [7];
  int checks = 0, failures = 0;
  // Block pairs of each row: {i_hi, j_hi, i_lo, j_lo}
  int pairs [7][4] = '{'{3,3,1,3}, '{3,0,1,0}, '{2,1,0,1}, '{3,1,1,1},
                      '{2,2,0,2}, '{3,2,1,2}, '{2,3,0,3}};

  pp_arrange #(.K(K)) dut (.prod(prod), .rows(rows));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint unsigned exp_row, total, rsum, hi, lo;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          prod[i][j] = (t < 2) ? (t == 0 ? 16'hffff : 16'h0001) : 16'($urandom);
      #1;
      total = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          total += longint'(prod[i][j]) << (K * (i + j));
      rsum = 0;
      for (int r = 0; r < 7; r++) begin
        hi = longint'(prod[pairs[r][0]][pairs[r][1]]) << (K * (pairs[r][0] + pairs[r][1]));
        lo = longint'(prod[pairs[r][2]][pairs[r][3]]) << (K * (pairs[r][2] + pairs[r][3]));
        exp_row = hi + lo;
        if (r == 0) begin
          hi = longint'(prod[2][0]) << (2 * K);
          lo = longint'(prod[0][0]);
          exp_row += hi + lo;
        end
        check(rows[r] == exp_row, $sformatf("row %0d: %h vs %h", r, rows[r], exp_row));
        check((hi & lo) == 0, $sformatf("row %0d fields overlap", r));
        rsum += rows[r];
      end
      check(rsum == total, "rows do not sum to the product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
