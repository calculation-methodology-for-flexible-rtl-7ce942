// Testbench of the operation control: every speed 0..255 is applied and
// the selection compared with the interval table of the application
// example ([0,32) complete product ... [96,150] and above one stage).
module tb_op_control;
  import flex_pkg::*;
  logic [7:0] speed;
  sel_t       sel;
  int checks = 0, failures = 0;

  op_control dut (.speed(speed), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stages;
    for (int v = 0; v < 256; v++) begin
      speed = 8'(v);
      #1;
      if (v < 32) stages = 4;
      else if (v < 64) stages = 3;
      else if (v < 96) stages = 2;
      else stages = 1;
      checks++;
      if (int'(sel) + 1 != stages) begin
        failures++;
        $display("FAIL speed %0d: %0d stages, expected %0d", v, int'(sel) + 1, stages);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
