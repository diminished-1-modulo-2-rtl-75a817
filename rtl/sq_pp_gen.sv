// sq_pp_gen: partial-product matrix of the diminished-1 modulo 2^n+1
// squarer.
//
// The squarer computes Q_-1 = |A_-1^2 + 2*A_-1|_(2^n+1). This block forms
// that sum as K rows of n bits each, with all weights folded into n columns:
//  - Every product a_i a_j of weight 2^(i+j) >= 2^n is complemented and
//    moved to column |i+j|_n (|2^k * b| = |2^(k-n) * (2^n + ~b)| modulo
//    2^n+1).
//  - The two equal products a_i a_j and a_j a_i of a column are replaced by
//    one a_i a_j in the next column; a pair that leaves column n-1 is
//    complemented into column 0. a_i a_i is simply a_i.
//  - 2*A_-1 adds one row: A_-1 shifted left with ~a_(n-1) at bit 0.
//  - The diminished-1 form of the total correction, which is all zeros,
//    adds one more row. It still matters: it gives the reduction tree the
//    inputs that make the tree produce the end-around carries the
//    correction was computed for.
// For odd n every column then holds (n+1)/2 + 2 bits. For even n the even
// columns hold n/2 + 4 bits and the odd ones n/2 + 1, so one full adder in
// every even column (its carry going to the next, odd, column) makes the
// matrix rectangular with n/2 + 2 rows. The full adder takes the first
// three bits of the column, a choice of this implementation.
// The total of all corrections made for the moved bits and for the K-2
// carries the reduction tree will wrap is 1 modulo 2^n+1, so
//   |sum of rows + K - 2 + 1|_(2^n+1) = Q_-1.
// Row order for odd n: folded pairs, then the diagonal bits a_i, then the
// 2*A row, then the zero row (the order of the worked n = 7 example).
// Purely combinational: one AND/NAND level, plus one full adder for even n.
module sq_pp_gen
  import dim1_sq_pkg::*;
#(
  parameter int unsigned N = 7,
  localparam int unsigned K = sq_rows(N)
) (
  input  logic [N-1:0] a,          // A_-1, the operand in diminished-1 form
  output logic [N-1:0] ops [K]     // matrix rows, column i at bit i
);

  for (genvar c = 0; c < N; c++) begin : g_col
    localparam int unsigned H = col_height(N, c);
    logic col_bits [H];

    for (genvar h = 0; h < H; h++) begin : g_bit
      localparam term_t T = term_of(N, c, h);
      localparam int unsigned I = int'(T.i);
      localparam int unsigned J = int'(T.j);
      if (T.kind == T_ZERO) begin : g_zero
        assign col_bits[h] = 1'b0;
      end else begin : g_and
        assign col_bits[h] = T.inv ^ (a[I] & a[J]);
      end
    end

    if (N % 2 == 1) begin : g_odd_n
      for (genvar r = 0; r < K; r++) begin : g_row
        assign ops[r][c] = col_bits[r];
      end
    end else if (c % 2 == 0) begin : g_even_col
      logic fa_c;   // carry of this column's full adder, into column c+1
      assign ops[0][c] = col_bits[0] ^ col_bits[1] ^ col_bits[2];
      assign fa_c      = (col_bits[0] & col_bits[1]) |
                           (col_bits[0] & col_bits[2]) |
                           (col_bits[1] & col_bits[2]);
      for (genvar r = 1; r < K; r++) begin : g_row
        assign ops[r][c] = col_bits[r+2];
      end
    end else begin : g_odd_col
      for (genvar r = 0; r < K - 1; r++) begin : g_row
        assign ops[r][c] = col_bits[r];
      end
      assign ops[K-1][c] = g_col[c-1].g_even_col.fa_c;
    end

    initial begin
      if (N % 2 == 1 || c % 2 == 1)
        assert (H == K - (N % 2 == 0 ? 1 : 0))
          else $error("column %0d has %0d bits", c, H);
      else
        assert (H == K + 2) else $error("column %0d has %0d bits", c, H);
    end
  end

endmodule
