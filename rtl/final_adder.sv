// Final carry-propagate adder of the flexible multiplier: adds the sum and
// carry vectors chosen by the first result multiplexer. Any adder
// architecture will do; this one is written as a plain W-bit addition and
// left to synthesis (a log-depth adder gives the lg n delay assumed for
// the method). The carry out of bit W-1 is dropped: inside the multiplier
// the total never exceeds the 8k-bit product. Combinational.
module final_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  always_comb y = a + b;

endmodule
