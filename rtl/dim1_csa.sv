// dim1_csa: one n-bit carry-save adder stage modulo 2^n+1.
//
// Three n-bit operands x, y, z are added by n full adders, one per bit
// column, giving a sum vector s and a carry vector c. The carry out of the
// most significant column has weight 2^n; since |c*2^n| = |2^n + ~c| modulo
// 2^n+1, it is complemented and placed at bit 0 of the carry vector, and the
// constant 2^n it leaves behind is accounted for in the squarer's total
// correction. Every stage therefore produces exactly one such end-around
// carry, and its outputs satisfy
//   |s + c|_(2^n+1) = |x + y + z + 1|_(2^n+1).
// A stage fed with a constant-zero operand degenerates into the half adders
// drawn in the squarer's reduction tree; synthesis removes the constant.
// Purely combinational.
module dim1_csa #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,   // sum vector, column i at bit i
  output logic [N-1:0] c    // carry vector, shifted by one column
);

  logic [N-1:0] maj;

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
  end

  // Carry of column i goes to column i+1; the carry of column N-1 wraps
  // around complemented into column 0.
  if (N > 1) begin : g_wide
    assign c = {maj[N-2:0], ~maj[N-1]};
  end else begin : g_one
    assign c = ~maj;
  end

endmodule
