// Workload testbench: independent multiplications at the error-analysis
// size, LUT 8-multiplication with n = 64 bit operands (eight blocks,
// eight selections). 100000 products of random fractions in [0, 1) are
// formed at every selection and the mean relative error against the
// exact product is measured. Expected from the selection rule: roughly
// 2^-5 to 2^-7 for one stage (single products have a heavier-tailed
// relative error than sums of products, since the exact value can be
// small), about k = 8 bits less per further stage, and exactly zero for
// all eight stages. Checked: stage 1 between 2^-8 and 2^-4.5, each further
// stage 5.5 to 10.5 bits better, stage 8 exact.
module tb_error_n64;
  localparam int K = 8, NBLK = 8, N = K * NBLK, TRIALS = 100000;

  logic [N-1:0]   a, b;
  logic [2:0]     sel;
  logic [2*N-1:0] r, exact, diff;
  real            err [8];
  real            lg  [8];
  int checks = 0, failures = 0;

  flex_mult #(.K(K), .NBLK(NBLK)) dut (.a(a), .b(b), .sel(sel), .r(r));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) err[s] = 0.0;
    for (int t = 0; t < TRIALS; t++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      exact = (2*N)'(a) * (2*N)'(b);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        diff = exact - r;
        if (exact != 0) err[s] += real'(diff) / real'(exact);
      end
    end
    for (int s = 0; s < 8; s++) begin
      err[s] = err[s] / TRIALS;
      if (s < 7) begin
        lg[s] = $ln(err[s]) / $ln(2.0);
        $display("%0d stages: mean relative error 2^%0.2f%s", s + 1, lg[s],
                 lg[s] <= -52.0 ? "  (below IEEE 754 double precision)" : "");
      end else begin
        $display("%0d stages: mean relative error %e", s + 1, err[s]);
      end
    end
    checks++;
    if (lg[0] > -4.5 || lg[0] < -8.0) failures++;
    for (int s = 1; s < 7; s++) begin
      checks++;
      if (lg[s-1] - lg[s] < 5.5 || lg[s-1] - lg[s] > 10.5) begin
        failures++;
        $display("FAIL stage %0d gains %0.2f bits", s + 1, lg[s-1] - lg[s]);
      end
    end
    checks++;
    if (err[7] != 0.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
