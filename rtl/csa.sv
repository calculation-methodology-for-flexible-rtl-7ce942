// Carry-save adder: a row of W full adders (3:2 counters) that reduces
// three W-bit vectors to a sum vector and a carry vector with
// a + b + c = s + cy (mod 2^W). The carry vector is already shifted one
// position left; the carry out of the top bit is dropped, which is exact
// whenever the true total fits in W bits (always the case inside the
// multiplier, whose partial sums never exceed the 8k-bit product).
// Combinational, two complex-gate delays.
module csa #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  // Majority of the lower W-1 bit columns; the top column's carry would
  // leave the vector.
  logic [W-2:0] maj;

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    cy  = {maj, 1'b0};
  end

endmodule
