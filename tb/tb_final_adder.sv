// Testbench of the final adder (W = 64): random and carry-chain corner
// cases compared with the 64-bit sum computed by the testbench.
module tb_final_adder;
  localparam int W = 64;
  logic [W-1:0] a, b, y;
  longint unsigned ea, eb;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      case (t)
        0: begin ea = '1; eb = 1; end
        1: begin ea = 64'h0000_ffff_ffff_ffff; eb = 1; end
        default: begin ea = {$urandom, $urandom}; eb = {$urandom, $urandom}; end
      endcase
      a = ea; b = eb;
      #1;
      checks++;
      if (y != ea + eb) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h = %h", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
