// Partial-product generation: groups the NBLK x NBLK block products
// Ai*Bj (2k bits each, weight 2^(k(i+j))) into 2*NBLK - 1 rows.
//
// For every block Bj there are two rows: the products of Bj with the
// even-numbered blocks of A, and those with the odd-numbered blocks. The
// products within one row sit 2k bits apart and never overlap. In the
// order B0-even, B0-odd, B1-even, ..., B(NBLK-1)-odd, the last row fits to
// the left of the first one, so those two share row 0 and the count is
// ceil(2n/k) - 1 = 2*NBLK - 1. For four blocks this is
//   row 0 : A3*B3 A1*B3 | A2*B0 A0*B0   (8k bits)
//   row 1 : A3*B0 A1*B0                 (offset k)
//   row 2 : A2*B1 A0*B1                 (offset k)
//   row 3 : A3*B1 A1*B1                 (offset 2k)
//   row 4 : A2*B2 A0*B2                 (offset 2k)
//   row 5 : A3*B2 A1*B2                 (offset 3k)
//   row 6 : A2*B3 A0*B3                 (offset 3k)
// which is the layout of the method's partial-product diagram. The
// generalisation to other even block counts (and to one block) is this
// design's, following the same rule. Rows are delivered as 2n-bit vectors
// aligned to their weight with zeros elsewhere. Pure wiring, no clock.
// Interface: prod[i][j] = Ai*Bj in, rows[0 .. 2*NBLK-2] out.
module pp_arrange #(
  parameter int unsigned K    = 8,
  parameter int unsigned NBLK = 4
) (
  input  logic [2*K-1:0]      prod [NBLK][NBLK],
  output logic [2*NBLK*K-1:0] rows [2*NBLK-1]
);

  localparam int unsigned W = 2 * NBLK * K;

  // Row idx of the uncombined sequence (0 .. 2*NBLK-1): block idx/2 of B
  // times the blocks of A whose index has the parity of idx.
  function automatic logic [W-1:0] seq_row(input logic [2*K-1:0] p [NBLK][NBLK],
                                           input int unsigned idx);
    logic [W-1:0] v;
    v = '0;
    for (int unsigned i = idx % 2; i < NBLK; i += 2) begin
      v = v | (W'(p[i][idx/2]) << (K * (i + idx / 2)));
    end
    return v;
  endfunction

  initial begin
    assert (NBLK == 1 || NBLK % 2 == 0)
      else $error("pp_arrange: the block count must be even (or one)");
  end

  always_comb begin
    if (NBLK == 1) begin
      rows[0] = seq_row(prod, 0);
    end else begin
      rows[0] = seq_row(prod, 0) | seq_row(prod, 2 * NBLK - 1);
      for (int unsigned r = 1; r < 2 * NBLK - 1; r++) begin
        rows[r] = seq_row(prod, r);
      end
    end
  end

endmodule
