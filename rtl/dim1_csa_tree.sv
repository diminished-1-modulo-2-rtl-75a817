// dim1_csa_tree: reduces K n-bit operands modulo 2^n+1 to two summands.
//
// The tree is a Dadda tree at word level: at each level the operand count
// m is brought down to the largest Dadda height below m (2, 3, 4, 6, 9,
// 13, ...) with just enough dim1_csa stages; the remaining operands pass to
// the next level unchanged. The number of levels therefore equals the Dadda
// depth D(K) (2 levels for 4 operands, 3 for 5-6, 4 for 7-9, ...).
// Every dim1_csa stage removes one operand and wraps one complemented
// carry from bit n-1 to bit 0, so the tree always produces exactly K-2
// end-around carries; the outputs satisfy
//   |sum0 + sum1|_(2^n+1) = |sum of operands + (K-2)|_(2^n+1).
// The squarer's derivation calls for a Dadda tree; building it from whole
// n-bit stages rather than individual counters is this implementation's
// choice. It keeps the Dadda depth and, for n = 7, the published
// arrangement of two stages, then one, then one. Bit-level simplifications
// that depend on the operand values (a stage input tied to zero or two
// identical inputs) are left to synthesis.
// Purely combinational; operands arrive as an unpacked array.
module dim1_csa_tree
  import dim1_sq_pkg::*;
#(
  parameter int unsigned N = 7,
  parameter int unsigned K = 6
) (
  input  logic [N-1:0] ops [K],
  output logic [N-1:0] sum0,
  output logic [N-1:0] sum1
);

  localparam int unsigned LEVELS = tree_levels(K);

  // Level l reads its operands from cur and leaves M_OUT of them in nxt.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned M_IN  = tree_rows_at(K, l);
    localparam int unsigned M_OUT = tree_rows_at(K, l + 1);
    localparam int unsigned NCSA  = M_IN - M_OUT;

    logic [N-1:0] cur [M_IN];
    logic [N-1:0] nxt [M_OUT];

    for (genvar r = 0; r < M_IN; r++) begin : g_in
      if (l == 0) begin : g_first
        assign cur[r] = ops[r];
      end else begin : g_next
        assign cur[r] = g_lvl[l-1].nxt[r];
      end
    end

    for (genvar g = 0; g < NCSA; g++) begin : g_csa
      dim1_csa #(.N(N)) u_csa (
        .x(cur[3*g]),
        .y(cur[3*g+1]),
        .z(cur[3*g+2]),
        .s(nxt[2*g]),
        .c(nxt[2*g+1])
      );
    end

    for (genvar r = 3*NCSA; r < M_IN; r++) begin : g_pass
      assign nxt[r - NCSA] = cur[r];
    end
  end

  assign sum0 = g_lvl[LEVELS-1].nxt[0];
  assign sum1 = g_lvl[LEVELS-1].nxt[1];

  initial begin
    assert (K >= 3) else $error("dim1_csa_tree needs at least three operands");
  end

endmodule
