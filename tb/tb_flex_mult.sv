// Testbench of the flexible multiplier (k = 8, n = 32). For random and
// extreme operands and all four selections the result is compared with the
// reference sum of the selected block products; selection 4 must also be
// the exact product a * b, and the results must not decrease from
// selection 1 to 4 nor exceed the exact product.
module tb_flex_mult;
  import flex_pkg::*;
  import tb_flex_ref_pkg::*;
  logic [31:0] a, b;
  sel_t        sel;
  logic [63:0] r;
  logic [63:0] prev;
  int checks = 0, failures = 0;

  flex_mult #(.K(8)) dut (.a(a), .b(b), .sel(sel), .r(r));

  initial begin
    #1000000;
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
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0: begin a = '1; b = '1; end
        1: begin a = '0; b = '1; end
        2: begin a = 32'h8000_0000; b = 32'h8000_0000; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      prev = '0;
      for (int s = 0; s < 4; s++) begin
        sel = sel_t'(s);
        #1;
        check(r == flex_ref(a, b, s),
              $sformatf("%h*%h sel %0d: %h vs %h", a, b, s, r, flex_ref(a, b, s)));
        check(r >= prev && r <= 64'(a) * 64'(b), $sformatf("%h*%h sel %0d order", a, b, s));
        prev = r;
      end
      check(r == 64'(a) * 64'(b), $sformatf("%h*%h exact", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
