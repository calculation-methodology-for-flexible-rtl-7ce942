// Workload testbench: the scalar-product application at the default size
// (k = 8, n = 32). For each of the four speed intervals it runs 1000
// scalar products of random vectors with components in [0, 1) and measures
// the mean relative error of the result against the exact scalar product,
// and the total time. Expected mean errors, from the precision of each
// selection: about 2^-6.9, 2^-14.8 and 2^-23.0 for one, two and three
// stages (checked within 1.5 binary orders of magnitude), and exactly zero
// for the complete product. The error is taken from the difference of the
// exact sum and the result modulo 2^64, so it is correct even when the sum
// of three products exceeds 1.0 and the 2n-bit result wraps.
module tb_table6_workload;
  import flex_pkg::*;

  localparam int SERIES = 1000;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [7:0]  speed = '0;
  logic [31:0] r_vec [3];
  logic [31:0] s_vec [3];
  logic        busy, done, ovf;
  logic [63:0] result;
  sel_t        sel_used;

  int checks = 0, failures = 0;
  real expected_log2 [4] = '{-6.89, -14.82, -22.97, 0.0};
  int  speeds [4] = '{120, 80, 40, 10};   // 1, 2, 3 and 4 stages

  scalar_product_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [65:0] exact;
    logic [63:0] diff;
    real err_sum, mean, lg;
    int  busy_cycles;
    for (int c = 0; c < 3; c++) begin r_vec[c] = '0; s_vec[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sidx = 0; sidx < 4; sidx++) begin
      err_sum = 0.0;
      busy_cycles = 0;
      for (int t = 0; t < SERIES; t++) begin
        @(negedge clk);
        speed = 8'(speeds[sidx]);
        exact = '0;
        for (int c = 0; c < 3; c++) begin
          r_vec[c] = $urandom;
          s_vec[c] = $urandom;
          exact = exact + {34'b0, r_vec[c]} * {34'b0, s_vec[c]};
        end
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done) begin
          if (busy) busy_cycles++;
          @(negedge clk);
        end
        diff = exact[63:0] - result;
        if (exact != 0) err_sum += real'(diff) / real'(exact);
      end
      mean = err_sum / SERIES;
      checks++;
      if (sidx == 3) begin
        $display("%0d stages: mean relative error %e, %0d cycles per scalar product",
                 sidx + 1, mean, busy_cycles / SERIES);
        if (mean != 0.0) failures++;
      end else begin
        lg = $ln(mean) / $ln(2.0);
        $display("%0d stages: mean relative error 2^%0.2f (about 2^%0.2f expected), %0d cycles per scalar product",
                 sidx + 1, lg, expected_log2[sidx], busy_cycles / SERIES);
        if (lg > expected_log2[sidx] + 1.5 || lg < expected_log2[sidx] - 1.5) failures++;
      end
      checks++;
      if (busy_cycles != SERIES * 3 * int'(dut.SEL_CYCLES[sidx])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
