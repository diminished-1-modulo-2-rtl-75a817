// dim1_adder: parallel diminished-1 modulo 2^n+1 adder.
//
// Given two n-bit summands x and y it returns the diminished-1 value
// |x + y + 1|_(2^n+1). In diminished-1 arithmetic this is the sum of the two
// numbers x+1 and y+1, and in the squarer it adds the constant 1 left over
// from the correction terms. It works with an inverted end-around carry:
// with x + y = cout*2^n + r, the result is r + ~cout modulo 2^n.
// The carries are computed by a Kogge-Stone parallel-prefix network over
// generate/propagate pairs; the group generate of all n bits is cout, and
// a last prefix level merges the carry-in ~cout into every position
// (c_i = G_(i-1:0) | P_(i-1:0) & ~cout), followed by the sum XORs.
// The function is the standard diminished-1 addition the squarer relies on;
// the Kogge-Stone network with a separate carry-in level is this
// implementation's choice (published diminished-1 adders fold the carry-in
// into the prefix levels and save that level).
// When x + y = 2^n - 1 the result is 2^n, the diminished-1 form of zero:
// q is then all zeros and zero is set (bit n of the diminished-1 result).
// Purely combinational.
module dim1_adder #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] q,
  output logic         zero
);

  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;

  // g[l][i], p[l][i]: group generate / propagate of bits i..max(0,i-2^l+1)
  logic [N-1:0] g [LV+1];
  logic [N-1:0] p [LV+1];
  logic [N-1:0] hs;      // half sums
  logic         cout;
  logic         cin;
  logic [N-1:0] carry;   // carry into each bit

  assign hs   = x ^ y;
  assign g[0] = x & y;
  assign p[0] = hs;

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_merge
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
        assign p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
      end else begin : g_keep
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign cout = g[LV][N-1];
  assign cin  = ~cout;

  assign carry[0] = cin;
  for (genvar i = 1; i < N; i++) begin : g_carry
    assign carry[i] = g[LV][i-1] | (p[LV][i-1] & cin);
  end

  assign q    = hs ^ carry;
  assign zero = cin & p[LV][N-1];

endmodule
