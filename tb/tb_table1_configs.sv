// Operand and block sizes of the partial-product count table: for k = 4
// and k = 8 and n = 8, 16, 32 and 64 bits the multiplier must form
// ceil(2n/k) - 1 partial products (1, 3, 7, 15 for k = 8; 3, 7, 15, 31 for
// k = 4) and compute every selection correctly, the last one exactly.
module tb_table1_configs;
  int checks = 0, failures = 0;
  bit d [8];
  int c [8];
  int f [8];

  tb_flex_cfg_check #(.K(8), .NBLK(1),  .EXP_ROWS(1))  u0 (.done(d[0]), .checks(c[0]), .failures(f[0]));
  tb_flex_cfg_check #(.K(8), .NBLK(2),  .EXP_ROWS(3))  u1 (.done(d[1]), .checks(c[1]), .failures(f[1]));
  tb_flex_cfg_check #(.K(8), .NBLK(4),  .EXP_ROWS(7))  u2 (.done(d[2]), .checks(c[2]), .failures(f[2]));
  tb_flex_cfg_check #(.K(8), .NBLK(8),  .EXP_ROWS(15)) u3 (.done(d[3]), .checks(c[3]), .failures(f[3]));
  tb_flex_cfg_check #(.K(4), .NBLK(2),  .EXP_ROWS(3))  u4 (.done(d[4]), .checks(c[4]), .failures(f[4]));
  tb_flex_cfg_check #(.K(4), .NBLK(4),  .EXP_ROWS(7))  u5 (.done(d[5]), .checks(c[5]), .failures(f[5]));
  tb_flex_cfg_check #(.K(4), .NBLK(8),  .EXP_ROWS(15)) u6 (.done(d[6]), .checks(c[6]), .failures(f[6]));
  tb_flex_cfg_check #(.K(4), .NBLK(16), .EXP_ROWS(31), .TRIALS(200)) u7 (.done(d[7]), .checks(c[7]), .failures(f[7]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d.and() == 1'b1);
    for (int i = 0; i < 8; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
