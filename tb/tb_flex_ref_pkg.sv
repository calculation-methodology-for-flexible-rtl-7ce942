// Reference model of the flexible multiplier for the testbenches. It is
// written from the partial-product diagram directly: the result of a
// selection is the sum of the block products Ai*Bj * 2^(k(i+j)) of the
// rows that selection includes.
//   selection 1: A3B3 A1B3 A2B0 A0B0
//   selection 2: + A3B2 A1B2 A2B3 A0B3
//   selection 3: + A3B1 A1B1 A2B2 A0B2
//   selection 4: every block pair (the exact product)
// Fixed to k = 8 (n = 32), the default size.
package tb_flex_ref_pkg;

  localparam int K = 8;

  function automatic bit in_sel(input int i, input int j, input int sel);
    bit s1, s2, s3;
    s1 = (i == 3 && j == 3) || (i == 1 && j == 3) || (i == 2 && j == 0) || (i == 0 && j == 0);
    s2 = (i == 3 && j == 2) || (i == 1 && j == 2) || (i == 2 && j == 3) || (i == 0 && j == 3);
    s3 = (i == 3 && j == 1) || (i == 1 && j == 1) || (i == 2 && j == 2) || (i == 0 && j == 2);
    case (sel)
      0: return s1;
      1: return s1 || s2;
      2: return s1 || s2 || s3;
      default: return 1'b1;
    endcase
  endfunction

  function automatic longint unsigned flex_ref(input int unsigned a, input int unsigned b,
                                               input int sel);
    longint unsigned acc, ai, bj;
    acc = 0;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        if (in_sel(i, j, sel)) begin
          ai = longint'(8'(a >> (K * i)));
          bj = longint'(8'(b >> (K * j)));
          acc += (ai * bj) << (K * (i + j));
        end
      end
    end
    return acc;
  endfunction

endpackage
