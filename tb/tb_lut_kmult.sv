// Testbench of the LUT k-multiplication table (k = 8, 16 ports): reads
// every one of the 65536 entries, spreading consecutive addresses over all
// ports so each port is exercised, and compares each word with x * y.
module tb_lut_kmult;
  localparam int K = 8, NP = 16;
  logic [K-1:0]   x [NP];
  logic [K-1:0]   y [NP];
  logic [2*K-1:0] p [NP];
  int checks = 0, failures = 0;

  lut_kmult #(.K(K), .NPORTS(NP)) dut (.x(x), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int base = 0; base < 65536; base += NP) begin
      for (int i = 0; i < NP; i++) begin
        // rotate the address-to-port mapping so every port sees all values
        int addr;
        addr = base + ((i + base / NP) % NP);
        x[i] = K'(addr >> K);
        y[i] = K'(addr);
      end
      #1;
      for (int i = 0; i < NP; i++) begin
        checks++;
        if (p[i] !== 16'(int'(x[i]) * int'(y[i]))) begin
          failures++;
          if (failures < 10) $display("port %0d: %0d*%0d gave %0d", i, x[i], y[i], p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
