// Testbench of the carry-save adder (W = 64): random and extreme vectors;
// the sum vector must be the bitwise XOR and sum + carry must equal the
// three-input sum modulo 2^64, with bit 0 of the carry vector zero.
module tb_csa;
  localparam int W = 64;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      if (t == 0) begin a = '1; b = '1; c = '1; end
      else begin
        a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      end
      #1;
      checks++;
      if (W'(s + cy) != W'(a + b + c) || s != (a ^ b ^ c) || cy[0] != 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h -> %h %h", a, b, c, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
