// Operation control: translates the application condition into the
// selection code of the flexible multiplier.
//
// It is a purely combinational coder, as the architecture asks for: three
// magnitude comparisons of the speed of the moving object against the
// interval bounds of the application example (0-32, 32-64, 64-96, 96-150)
// give one of four selections. The faster the object, the fewer partial
// products are combined:
//   speed <  TH1         -> SEL_4 (complete product)
//   TH1 <= speed < TH2   -> SEL_3
//   TH2 <= speed < TH3   -> SEL_2
//   speed >= TH3         -> SEL_1 (first and last partial product)
// The bounds and the stage counts per interval follow the application
// example. A speed that sits exactly on a bound goes to the upper interval,
// and speeds above 150 use the fastest selection: both are choices of this
// design. Interface: speed (SPEED_W bits, unsigned), sel (flex_pkg::sel_t).
// No clock; output settles one comparator delay after the input.
module op_control
  import flex_pkg::*;
#(
  parameter int unsigned SPEED_W = 8,
  parameter int unsigned TH1     = 32,
  parameter int unsigned TH2     = 64,
  parameter int unsigned TH3     = 96
) (
  input  logic [SPEED_W-1:0] speed,
  output sel_t               sel
);

  always_comb begin
    if (32'(speed) < TH1)      sel = SEL_4;
    else if (32'(speed) < TH2) sel = SEL_3;
    else if (32'(speed) < TH3) sel = SEL_2;
    else                       sel = SEL_1;
  end

endmodule
