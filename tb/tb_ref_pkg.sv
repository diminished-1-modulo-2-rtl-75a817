// tb_ref_pkg: reference arithmetic modulo 2^n+1 for the testbenches.
// Values are held in 128-bit vectors so that squares of operands up to
// 2^32 are exact; n may be at most 40.
package tb_ref_pkg;

  typedef logic [127:0] big_t;

  function automatic big_t modulus(input int unsigned n);
    return (big_t'(1) << n) + 1;
  endfunction

  // Diminished-1 square: operand a (bit n = zero flag), result same form.
  function automatic big_t dim1_square(input int unsigned n, input big_t a);
    big_t m, x, q;
    m = modulus(n);
    if (a[n]) x = 0;
    else      x = (a & ((big_t'(1) << n) - 1)) + 1;
    q = (x * x) % m;
    if (q == 0) return big_t'(1) << n;
    return q - 1;
  endfunction

  // Diminished-1 sum of two n-bit diminished-1 values x and y, that is
  // |x + y + 1|_(2^n+1); the value 2^n (bit n set) stands for zero.
  function automatic big_t dim1_add(input int unsigned n, input big_t x,
                                    input big_t y);
    return (x + y + 1) % modulus(n);
  endfunction

endpackage
