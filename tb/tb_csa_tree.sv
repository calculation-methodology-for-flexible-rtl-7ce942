// Testbench of the reduction tree with taps (k = 8): random rows; each tap
// pair must add up to the sum of the rows its selection includes
// (tap 2: rows 0,5,6; tap 3: rows 0,3,4,5,6; tap 4: all), modulo 2^64.
module tb_csa_tree;
  localparam int K = 8, W = 8 * K;
  logic [W-1:0] rows [7];
  logic [W-1:0] s2, c2, s3, c3, s4, c4;
  int checks = 0, failures = 0;

  csa_tree #(.K(K)) dut (.rows(rows), .s2(s2), .c2(c2), .s3(s3), .c3(c3), .s4(s4), .c4(c4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input int tap);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL tap %0d: %h vs %h", tap, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] e2, e3, e4;
    for (int t = 0; t < 5000; t++) begin
      for (int r = 0; r < 7; r++) rows[r] = (t == 0) ? '1 : {$urandom, $urandom};
      #1;
      e2 = rows[0] + rows[5] + rows[6];
      e3 = e2 + rows[3] + rows[4];
      e4 = e3 + rows[1] + rows[2];
      check(s2 + c2, e2, 2);
      check(s3 + c3, e3, 3);
      check(s4 + c4, e4, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
