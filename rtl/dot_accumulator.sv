// Addition stage of the scalar product: an adder whose output is fed back
// through a register, so that successive products are summed.
//
// clr loads zero (the start of a new scalar product), en adds the input to
// the running sum. The sum is W = 2n bits wide, the width of the product
// and of the result bus. Products of fractions in [0, 1) can add up to more
// than one, so the carry out of the top bit is kept as a sticky overflow
// flag that clr clears; the flag is this design's addition. Both act on the
// rising clock edge; rst_n is an asynchronous active-low reset. If clr and
// en are high together the register loads the input (a new sum starts with
// this product).
module dot_accumulator #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] acc,
  output logic         ovf
);

  logic [W:0] sum;

  always_comb sum = {1'b0, acc} + {1'b0, din};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (clr && en) begin
      acc <= din;
      ovf <= 1'b0;
    end else if (clr) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (en) begin
      acc <= sum[W-1:0];
      ovf <= ovf | sum[W];
    end
  end

endmodule
