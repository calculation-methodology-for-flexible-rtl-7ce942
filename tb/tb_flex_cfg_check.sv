// Checker used by tb_table1_configs: one flexible multiplier of the given
// size driven with random and extreme operands. For every selection the
// result is compared with a reference written from the selection rule
// (selection s keeps the block products of row 0 and of the 2(s-1)
// highest-weight rows), the last selection with the exact product, and
// the number of partial-product rows with EXP_ROWS. Reports its counts on
// its ports when done rises.
module tb_flex_cfg_check #(
  parameter int unsigned K        = 8,
  parameter int unsigned NBLK     = 4,
  parameter int unsigned EXP_ROWS = 7,
  parameter int unsigned TRIALS   = 500
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int unsigned N = NBLK * K;
  localparam int unsigned SEL_W = (NBLK > 1) ? $clog2(NBLK) : 1;

  logic [N-1:0]     a, b;
  logic [SEL_W-1:0] sel;
  logic [2*N-1:0]   r;

  flex_mult #(.K(K), .NBLK(NBLK)) dut (.a(a), .b(b), .sel(sel), .r(r));

  // Row of product Ai*Bj in the uncombined sequence: 2j + (i mod 2); the
  // last one (2*NBLK-1) shares row 0.
  function automatic logic [2*N-1:0] ref_sel(input logic [N-1:0] x, input logic [N-1:0] y,
                                             input int stage);
    logic [2*N-1:0] acc, t;
    int rr;
    acc = '0;
    for (int i = 0; i < NBLK; i++) begin
      for (int j = 0; j < NBLK; j++) begin
        rr = 2 * j + (i % 2);
        if (rr == 0 || rr == 2 * NBLK - 1 || rr >= 2 * NBLK - 2 * stage + 1) begin
          t = (2*N)'(x[i*K +: K]) * (2*N)'(y[j*K +: K]);
          acc += t << (K * (i + j));
        end
      end
    end
    return acc;
  endfunction

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int w = 0; w < (N + 31) / 32; w++) v = (v << 32) | N'($urandom);
    return v;
  endfunction

  initial begin
    logic [2*N-1:0] prev, exact;
    done = 0; checks = 0; failures = 0;
    checks++;
    if ($size(dut.rows) != EXP_ROWS) begin
      failures++;
      $display("FAIL k=%0d n=%0d: %0d partial products, expected %0d", K, N, $size(dut.rows), EXP_ROWS);
    end
    for (int t = 0; t < TRIALS; t++) begin
      a = (t == 0) ? '1 : rnd();
      b = (t == 0) ? '1 : rnd();
      exact = (2*N)'(a) * (2*N)'(b);
      prev = '0;
      for (int s = 1; s <= NBLK; s++) begin
        sel = SEL_W'(s - 1);
        #1;
        checks++;
        if (r != ref_sel(a, b, s) || r < prev || r > exact) begin
          failures++;
          if (failures < 5) $display("FAIL k=%0d n=%0d sel %0d: %h vs %h", K, N, s, r, ref_sel(a, b, s));
        end
        prev = r;
      end
      checks++;
      if (r != exact) failures++;
    end
    done = 1;
  end
endmodule
