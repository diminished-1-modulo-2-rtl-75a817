// dim1_squarer: squarer modulo 2^n+1 for operands in diminished-1 form.
//
// A number A in [0, 2^n] is carried as A_-1 = A - 1 on n bits, with an
// extra bit n that marks A = 0. The square Q = |A^2|_(2^n+1) satisfies
//   Q_-1 = |A_-1^2 + 2*A_-1|_(2^n+1),
// which needs no (n+1)-bit arithmetic:
//   1. sq_pp_gen forms the AND/NAND partial products of A_-1^2 with equal
//      pairs folded, the row 2*A_-1 and an all-zeros correction row, K rows
//      of n bits (K = (n+1)/2 + 2 for odd n, n/2 + 2 for even n).
//   2. dim1_csa_tree reduces them to two summands with a Dadda-ordered tree
//      of carry-save stages whose top carries wrap around complemented.
//   3. dim1_adder adds the two summands plus one modulo 2^n+1 with an
//      inverted end-around carry.
// All constant corrections made on the way add up to exactly 1 modulo
// 2^n+1, which is the +1 the diminished-1 adder supplies, so no correction
// hardware is needed.
// Zero handling (the flag-bit encoding and the override are this
// implementation's choice; the method only says that arithmetic is skipped
// for a zero operand): a[N] = 1 means the operand is zero; the arithmetic result
// is then overridden and q returns zero (q[N] = 1, q[N-1:0] = 0). A square
// that is zero although the operand is not (possible only when 2^n+1 has a
// repeated prime factor, e.g. n = 3) comes out of the adder with q[N] = 1.
// Purely combinational; the delay is one AND/NAND level, D(K) carry-save
// levels (one more for even n) and the prefix adder.
module dim1_squarer #(
  parameter int unsigned N = 7
) (
  input  logic [N:0] a,   // operand: a[N]=1 for zero, else A_-1 in a[N-1:0]
  output logic [N:0] q    // square, same encoding
);

  localparam int unsigned K = dim1_sq_pkg::sq_rows(N);

  logic [N-1:0] ops [K];
  logic [N-1:0] sum0, sum1;
  logic [N-1:0] q_arith;
  logic         q_zero;

  sq_pp_gen #(.N(N)) u_pp (
    .a  (a[N-1:0]),
    .ops(ops)
  );

  dim1_csa_tree #(.N(N), .K(K)) u_tree (
    .ops (ops),
    .sum0(sum0),
    .sum1(sum1)
  );

  dim1_adder #(.N(N)) u_add (
    .x   (sum0),
    .y   (sum1),
    .q   (q_arith),
    .zero(q_zero)
  );

  always_comb begin
    if (a[N]) q = {1'b1, {N{1'b0}}};
    else      q = {q_zero, q_arith};
  end

endmodule
