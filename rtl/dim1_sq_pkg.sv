// dim1_sq_pkg: constants and elaboration-time helpers shared by the
// diminished-1 modulo 2^n+1 squarer.
//
// The squarer reduces a rectangular matrix of K n-bit operands with a tree
// of modular carry-save adders ordered like a Dadda tree. The functions here
// give K for a word length n, the Dadda height sequence 2, 3, 4, 6, 9, 13,
// ... (each height is floor(1.5x) of the previous one), the number of tree
// levels for K operands and the number of operands left after each level.
// They are evaluated at elaboration only and produce no hardware.
package dim1_sq_pkg;

  // Number of n-bit operands fed to the carry-save tree.
  // Odd n : (n+1)/2 folded product rows, plus the 2*A row and the
  //         all-zeros correction row.
  // Even n: after one full adder per even column every column holds n/2+2
  //         bits.
  function automatic int unsigned sq_rows(input int unsigned n);
    if (n % 2 == 1) return (n + 1) / 2 + 2;
    else            return n / 2 + 2;
  endfunction

  // Largest Dadda height strictly below m (m >= 3).
  function automatic int unsigned dadda_below(input int unsigned m);
    int unsigned d, nd;
    d = 2;
    forever begin
      nd = (d * 3) / 2;
      if (nd >= m) return d;
      d = nd;
    end
  endfunction

  // Operands left after level l of the tree that starts with k operands.
  function automatic int unsigned tree_rows_at(input int unsigned k,
                                               input int unsigned l);
    int unsigned m;
    m = k;
    for (int unsigned i = 0; i < l; i++)
      if (m > 2) m = dadda_below(m);
    return m;
  endfunction

  // Number of carry-save levels needed to bring k operands down to two.
  function automatic int unsigned tree_levels(input int unsigned k);
    int unsigned m, l;
    m = k;
    l = 0;
    while (m > 2) begin
      m = dadda_below(m);
      l++;
    end
    return l;
  endfunction

  // Source of one bit of the initial partial-product matrix.
  typedef enum logic [1:0] {
    T_PAIR = 2'd0,   // a_i & a_j, i < j, folded pair of equal products
    T_DIAG = 2'd1,   // a_i & a_i = a_i
    T_TWOA = 2'd2,   // bit of the 2*A_-1 row
    T_ZERO = 2'd3    // bit of the all-zeros correction row C_-1
  } term_kind_e;

  typedef struct packed {
    term_kind_e  kind;
    logic [7:0]  i;
    logic [7:0]  j;
    logic        inv;   // complemented (moved around modulo 2^n+1)
  } term_t;

  // Number of bits in column c of the initial matrix (before the even-n
  // full-adder stage): folded pairs, diagonal bits, one 2*A bit, one zero.
  function automatic int unsigned col_height(input int unsigned n,
                                             input int unsigned c);
    int unsigned h;
    h = 2;
    for (int unsigned i = 0; i < n; i++) begin
      for (int unsigned j = i + 1; j < n; j++)
        if ((i + j + 1) % n == c) h++;
      if ((2 * i) % n == c) h++;
    end
    return h;
  endfunction

  // The h-th bit of column c of the initial matrix. Order: folded pairs
  // (i ascending, then j), diagonal bits, the 2*A bit, the zero bit.
  //  - A pair a_i a_j (i < j) appears twice at weight 2^(i+j) and is
  //    replaced by one bit at weight 2^(i+j+1); at or beyond 2^n it is
  //    complemented and moved to column |i+j+1|_n.
  //  - A diagonal bit a_i sits at weight 2^(2i); at or beyond 2^n it is
  //    complemented and moved to column |2i|_n.
  //  - 2*A_-1 is A_-1 shifted left, its top bit complemented into bit 0.
  function automatic term_t term_of(input int unsigned n,
                                    input int unsigned c,
                                    input int unsigned h);
    int unsigned k;
    term_t t;
    k = 0;
    t = '{kind: T_ZERO, i: 8'd0, j: 8'd0, inv: 1'b0};
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned j = i + 1; j < n; j++)
        if ((i + j + 1) % n == c) begin
          if (k == h) begin
            t.kind = T_PAIR; t.i = 8'(i); t.j = 8'(j);
            t.inv  = (i + j + 1 >= n);
            return t;
          end
          k++;
        end
    for (int unsigned i = 0; i < n; i++)
      if ((2 * i) % n == c) begin
        if (k == h) begin
          t.kind = T_DIAG; t.i = 8'(i); t.j = 8'(i);
          t.inv  = (2 * i >= n);
          return t;
        end
        k++;
      end
    if (k == h) begin
      t.kind = T_TWOA;
      t.i    = (c == 0) ? 8'(n - 1) : 8'(c - 1);
      t.j    = t.i;
      t.inv  = (c == 0);
      return t;
    end
    return t;
  endfunction

endpackage
