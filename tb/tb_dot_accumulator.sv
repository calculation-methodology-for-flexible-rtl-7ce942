// Testbench of the accumulating adder (W = 64): random sequences of clear,
// enable and data, including sums that overflow, against a 65-bit model of
// the running sum and the sticky overflow flag.
module tb_dot_accumulator;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] din = '0, acc;
  logic ovf;
  logic [W-1:0] m_acc;
  logic m_ovf;
  int checks = 0, failures = 0, n_ovf = 0;

  dot_accumulator #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .din(din),
                                .acc(acc), .ovf(ovf));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] s;
    m_acc = '0; m_ovf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (acc != m_acc || ovf != m_ovf) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d acc %h/%h ovf %0d/%0d", t, acc, m_acc, ovf, m_ovf);
      end
      clr = ($urandom % 8) == 0;
      en  = ($urandom % 4) != 0;
      din = {$urandom, $urandom};
      @(posedge clk);
      #1;
      s = {1'b0, m_acc} + {1'b0, din};
      if (clr && en) begin m_acc = din; m_ovf = 0; end
      else if (clr) begin m_acc = '0; m_ovf = 0; end
      else if (en) begin
        m_acc = s[W-1:0];
        if (s[W] && !m_ovf) n_ovf++;
        m_ovf = m_ovf | s[W];
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
