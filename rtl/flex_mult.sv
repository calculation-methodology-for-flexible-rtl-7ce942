// Flexible multiplier: n x n -> 2n bit unsigned product whose precision and
// delay are chosen per operation by a selection code.
//
// Both operands (n = NBLK * k bits) are split into k-bit blocks. All block
// products come at once from the multiport LUT k-multiplication table and
// are arranged into 2*NBLK - 1 partial-product rows. A CSA reduction
// offers a sum/carry tap per selection; the first multiplexer picks one of
// them for the final adder, the second multiplexer picks either the adder
// output or the bypass (row 0: the first and the last partial product side
// by side). Selection s (code s-1) adds, on top of row 0, the 2(s-1) rows
// of highest weight; the rows left out always carry the lowest weights, so
// the result never exceeds the exact product, and the last selection is
// exact. Each further selection gains about k bits of precision.
//
// Main configuration, NBLK = 4 (the block diagram of the architecture):
//   SEL_1 : LUT + mux                      (row 0)
//   SEL_2 : LUT + 1 CSA + adder + 2 mux    (rows 0, 5, 6)
//   SEL_3 : LUT + 3 CSA + adder + 2 mux    (rows 0, 3..6)
//   SEL_4 : LUT + 4 CSA + adder + 2 mux    (all rows, exact product)
// using the six-CSA tree of csa_tree. For other even block counts (the
// method is also evaluated with n = 64, k = 8, eight selections) this
// design reduces the rows with a chain: one CSA for selection 2, then two
// CSAs per further selection, each adding its two new rows to the previous
// tap. That chain is this design's choice; it is not a Wallace tree of
// minimum depth.
// The whole unit is combinational, as in the architecture: a clocked user
// must wait for the selected path (see scalar_product_unit). Defaults are
// the application example's k = 8, n = 32. The selection port is
// $clog2(NBLK) bits wide, 2 bits (flex_pkg::sel_t codes) by default.
module flex_mult #(
  parameter int unsigned K     = 8,
  parameter int unsigned NBLK  = 4,
  parameter int unsigned SEL_W = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic [NBLK*K-1:0]   a,
  input  logic [NBLK*K-1:0]   b,
  input  logic [SEL_W-1:0]    sel,
  output logic [2*NBLK*K-1:0] r
);

  localparam int unsigned NP    = NBLK * NBLK;
  localparam int unsigned NROWS = 2 * NBLK - 1;
  localparam int unsigned W     = 2 * NBLK * K;
  // Taps of selections 2 .. NBLK are kept at index 2 .. NBLK.
  localparam int unsigned NTAP  = (NBLK > 1) ? NBLK + 1 : 2;

  logic [K-1:0]   lx [NP];
  logic [K-1:0]   ly [NP];
  logic [2*K-1:0] lp [NP];
  logic [2*K-1:0] prod [NBLK][NBLK];
  logic [W-1:0]   rows [NROWS];
  logic [W-1:0]   tap_s [NTAP];
  logic [W-1:0]   tap_c [NTAP];
  logic [W-1:0]   add_a, add_b, add_y;

  // Port i*NBLK+j of the table multiplies block Ai by block Bj.
  always_comb begin
    for (int i = 0; i < NBLK; i++) begin
      for (int j = 0; j < NBLK; j++) begin
        lx[i*NBLK+j] = a[i*K +: K];
        ly[i*NBLK+j] = b[j*K +: K];
        prod[i][j]   = lp[i*NBLK+j];
      end
    end
  end

  lut_kmult  #(.K(K), .NPORTS(NP))  u_lut (.x(lx), .y(ly), .p(lp));
  pp_arrange #(.K(K), .NBLK(NBLK))  u_pp  (.prod(prod), .rows(rows));

  // Unused tap slots (selection 1 and index 0) carry zero.
  assign tap_s[0] = '0;
  assign tap_c[0] = '0;
  assign tap_s[1] = '0;
  assign tap_c[1] = '0;

  if (NBLK == 4) begin : g_tree
    csa_tree #(.K(K)) u_tree (.rows(rows),
                              .s2(tap_s[2]), .c2(tap_c[2]),
                              .s3(tap_s[3]), .c3(tap_c[3]),
                              .s4(tap_s[4]), .c4(tap_c[4]));
  end else if (NBLK > 1) begin : g_chain
    csa #(.W(W)) u_first (.a(rows[0]), .b(rows[NROWS-2]), .c(rows[NROWS-1]),
                          .s(tap_s[2]), .cy(tap_c[2]));
    for (genvar s = 3; s <= NBLK; s++) begin : g_stage
      logic [W-1:0] ms, mc;
      // Selection s adds rows 2*NBLK-2s+1 and 2*NBLK-2s+2.
      csa #(.W(W)) u_lo (.a(tap_s[s-1]), .b(tap_c[s-1]), .c(rows[2*NBLK-2*s+2]),
                         .s(ms), .cy(mc));
      csa #(.W(W)) u_hi (.a(ms), .b(mc), .c(rows[2*NBLK-2*s+1]),
                         .s(tap_s[s]), .cy(tap_c[s]));
    end
  end

  // First multiplexer: which sum/carry pair reaches the adder.
  always_comb begin
    add_a = tap_s[NTAP-1];
    add_b = tap_c[NTAP-1];
    for (int s = 2; s < NTAP; s++) begin
      if (int'(sel) == s - 1) begin
        add_a = tap_s[s];
        add_b = tap_c[s];
      end
    end
  end

  final_adder #(.W(W)) u_add (.a(add_a), .b(add_b), .y(add_y));

  // Second multiplexer: bypass for the first selection (the only one when
  // an operand is a single block).
  assign r = (sel == '0 || NBLK == 1) ? rows[0] : add_y;

endmodule
