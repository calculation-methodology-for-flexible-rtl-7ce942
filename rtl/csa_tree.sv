// Partial-product reduction tree with taps for the flexible multiplier
// with operands of four k-bit blocks.
//
// Six carry-save adders combine the seven partial-product rows so that the
// result can be picked up, as a sum/carry pair, at three depths:
//   tap 2 (selection 2): rows 0, 5, 6            after 1 CSA level
//   tap 3 (selection 3): rows 0, 3, 4, 5, 6      after 3 CSA levels
//   tap 4 (selection 4): all seven rows          after 4 CSA levels
// Selection 1 (rows 0 only) needs no reduction and bypasses the tree.
// Structure:
//   L1: u_a = CSA(row0, row5, row6)        -> tap 2
//       u_b = CSA(row1, row2, row3)
//   L2: u_c = CSA(u_a.s, u_a.c, row4)
//   L3: u_d = CSA(u_c.s, u_c.c, row3)      -> tap 3
//       u_e = CSA(u_c.s, u_c.c, u_b.s)
//   L4: u_f = CSA(u_e.s, u_e.c, u_b.c)     -> tap 4
// The tap depths (1, 3 and 4 CSA delays) and the count of six CSAs follow
// the path-delay list and block diagram of the architecture; the exact
// wiring between the adders is this design's reading of that diagram.
// All vectors are 8k bits; combinational.
module csa_tree #(
  parameter int unsigned K = 8
) (
  input  logic [8*K-1:0] rows   [7],
  output logic [8*K-1:0] s2, c2,
  output logic [8*K-1:0] s3, c3,
  output logic [8*K-1:0] s4, c4
);

  localparam int unsigned W = 8 * K;

  logic [W-1:0] sa, ca, sb, cb, sc, cc, se, ce;

  csa #(.W(W)) u_a (.a(rows[0]), .b(rows[5]), .c(rows[6]), .s(sa), .cy(ca));
  csa #(.W(W)) u_b (.a(rows[1]), .b(rows[2]), .c(rows[3]), .s(sb), .cy(cb));
  csa #(.W(W)) u_c (.a(sa),      .b(ca),      .c(rows[4]), .s(sc), .cy(cc));
  csa #(.W(W)) u_d (.a(sc),      .b(cc),      .c(rows[3]), .s(s3), .cy(c3));
  csa #(.W(W)) u_e (.a(sc),      .b(cc),      .c(sb),      .s(se), .cy(ce));
  csa #(.W(W)) u_f (.a(se),      .b(ce),      .c(cb),      .s(s4), .cy(c4));

  assign s2 = sa;
  assign c2 = ca;

endmodule
