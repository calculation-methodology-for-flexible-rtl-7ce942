// Shared types of the flexible multiplier and the scalar product unit.
//
// For operands of four k-bit blocks (the main configuration) the result
// can be taken at four points of the partial-product reduction
// ("selections"), each combining more partial products and taking more
// time. The selection code is two bits wide, as the control bus from the
// operation control to the result multiplexers; its value is the number of
// selection stages minus one.
package flex_pkg;

  typedef enum logic [1:0] {
    SEL_1 = 2'd0,  // first and last partial product only, no addition
    SEL_2 = 2'd1,  // + rows A3B2/A2B3 : one CSA level and the final adder
    SEL_3 = 2'd2,  // + rows A3B1/A2B2 : three CSA levels and the final adder
    SEL_4 = 2'd3   // all rows, exact product : four CSA levels and the adder
  } sel_t;

endpackage
