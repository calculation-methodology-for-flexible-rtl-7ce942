// LUT k-multiplication: a read-only table that holds the 2k-bit product of
// every pair of k-bit numbers, addressed by the concatenated operand pair
// {x, y}. With k = 8 the table has 65536 words of 16 bits (128 KB).
//
// NPORTS independent read ports access the table concurrently, so that all
// block pairs of the two operands are looked up at the same time (16 for
// operands of four blocks). Reads are asynchronous: p[i] follows x[i], y[i]
// after one table access time, without a clock.
//
// The table contents are the formula p = x * y for x, y in 0 .. 2^k - 1,
// stored at address x * 2^k + y; they are computed when the table is
// initialised rather than read from a file. The port count and the
// asynchronous read are choices of this design; the table itself and its
// addressing by the operand value follow the k-operator principle.
module lut_kmult #(
  parameter int unsigned K      = 8,
  parameter int unsigned NPORTS = 16
) (
  input  logic [K-1:0]   x [NPORTS],
  input  logic [K-1:0]   y [NPORTS],
  output logic [2*K-1:0] p [NPORTS]
);

  localparam int unsigned DEPTH = 1 << (2 * K);

  logic [2*K-1:0] table_q [DEPTH];

  initial begin
    for (int unsigned a = 0; a < (1 << K); a++) begin
      for (int unsigned b = 0; b < (1 << K); b++) begin
        table_q[(a << K) | b] = (2*K)'(a * b);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      p[i] = table_q[{x[i], y[i]}];
    end
  end

endmodule
